// Self-checking test of the lane-1 branch unit: PCSrc must be Branch AND
// (a == b), and the target (sign-extended immediate * 4) + PC+4, for random
// positive and negative offsets.
module branch_unit_tb;
  logic [15:0] imm;
  logic [31:0] pcplus4, a, b, pcbranch;
  logic        branch, pcsrc;
  int checks = 0, failures = 0;

  branch_unit dut (.imm, .pcplus4, .a, .b, .branch, .pcsrc, .pcbranch);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) begin
      int off;
      imm = 16'($urandom); pcplus4 = {$urandom_range(0, 32'h0fff_ffff), 2'b00};
      a = $urandom; b = ($urandom_range(0, 1) == 1) ? a : $urandom;
      branch = 1'($urandom);
      #1;
      off = int'($signed(imm)) * 4;
      checks += 2;
      if (pcbranch !== pcplus4 + 32'(off)) begin
        failures++; $display("FAIL target imm=%h pc4=%h got %h", imm, pcplus4, pcbranch);
      end
      if (pcsrc !== (branch && a == b)) begin
        failures++; $display("FAIL pcsrc branch=%b a=%h b=%h got %b", branch, a, b, pcsrc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
