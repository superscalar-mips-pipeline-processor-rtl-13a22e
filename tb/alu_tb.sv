// Self-checking test of the ALU: random and corner operands for each of the
// five operations, compared with results computed here from SystemVerilog
// operators.
module alu_tb;
  import mips_ss_pkg::*;
  logic [31:0] a, b, y;
  alu_ctrl_t   ctrl;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .ctrl, .y, .zero);

  function automatic logic [31:0] model(alu_ctrl_t c, logic [31:0] x, logic [31:0] z);
    case (c)
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_SLT: return {31'd0, $signed(x) < $signed(z)};
      default: return '0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_ctrl_t ops [5] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT};
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h5};
    foreach (ops[k]) begin
      foreach (corner[i]) foreach (corner[j]) begin
        ctrl = ops[k]; a = corner[i]; b = corner[j]; #1;
        checks++;
        if (y !== model(ctrl, a, b) || zero !== (model(ctrl, a, b) == 0)) begin
          failures++;
          $display("FAIL op=%s a=%h b=%h y=%h", ctrl.name(), a, b, y);
        end
      end
      repeat (200) begin
        ctrl = ops[k]; a = $urandom; b = $urandom; #1;
        checks++;
        if (y !== model(ctrl, a, b)) begin
          failures++;
          $display("FAIL op=%s a=%h b=%h y=%h", ctrl.name(), a, b, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
