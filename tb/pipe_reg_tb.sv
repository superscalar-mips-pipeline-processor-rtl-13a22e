// Self-checking test of the pipeline register, instantiated with a stage
// struct: it must load when enabled, hold when stalled, become a bubble when
// flushed while enabled, ignore a flush while stalled, and clear on reset.
module pipe_reg_tb;
  import mips_ss_pkg::*;
  logic clk = 0, reset, en, clr;
  em_t d, q, model;
  int checks = 0, failures = 0;

  pipe_reg #(.T(em_t)) dut (.clk, .reset, .en, .clr, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; en = 0; clr = 0; d = '0;
    @(posedge clk); #1;
    model = '0;
    checks++; if (q !== model) begin failures++; $display("FAIL reset"); end
    reset = 0;
    repeat (1000) begin
      @(negedge clk);
      d = em_t'({$urandom, $urandom, $urandom});
      en = ($urandom_range(0, 3) != 0); clr = ($urandom_range(0, 3) == 0);
      reset = ($urandom_range(0, 50) == 0);
      @(posedge clk); #1;
      if (reset) model = '0;
      else if (en && clr) model = '0;
      else if (en) model = d;
      checks++;
      if (q !== model) begin
        failures++; $display("FAIL en=%b clr=%b rst=%b q=%h exp=%h", en, clr, reset, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
