// Self-checking test of the five-input forwarding multiplexer: every select
// value with random data must pass exactly the chosen input.
module fwd_mux_tb;
  import mips_ss_pkg::*;
  fwd_sel_t    sel;
  logic [31:0] rf, m1, m2, w1, w2, y, exp_y;
  int checks = 0, failures = 0;

  fwd_mux dut (.sel, .rf, .m1, .m2, .w1, .w2, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fwd_sel_t sels [5] = '{FWD_RF, FWD_M1, FWD_M2, FWD_W1, FWD_W2};
    repeat (100) foreach (sels[k]) begin
      rf = $urandom; m1 = $urandom; m2 = $urandom; w1 = $urandom; w2 = $urandom;
      sel = sels[k]; #1;
      exp_y = (k == 0) ? rf : (k == 1) ? m1 : (k == 2) ? m2 : (k == 3) ? w1 : w2;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL sel=%s y=%h exp=%h", sel.name(), y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
