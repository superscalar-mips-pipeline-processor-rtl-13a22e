// Self-checking test of the two-port data memory: random stores and loads on
// both ports against a shadow array; loads read the contents before the
// clock edge, and lane 2 wins when both ports store to one word.
module dmem_tb;
  localparam int WORDS = 64;
  logic clk = 0;
  logic        we1, we2;
  logic [31:0] a1, a2, wd1, wd2, rd1, rd2;
  logic [31:0] shadow [WORDS];
  int checks = 0, failures = 0;

  dmem #(.WORDS(WORDS)) dut (.clk, .we1, .a1, .wd1, .rd1, .we2, .a2, .wd2, .rd2);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = 0;
    repeat (3000) begin
      @(negedge clk);
      we1 = 1'($urandom); we2 = 1'($urandom);
      a1 = 32'($urandom_range(0, 15)) << 2;
      a2 = ($urandom_range(0, 3) == 0) ? a1 : 32'($urandom_range(0, 15)) << 2;
      wd1 = $urandom; wd2 = $urandom;
      #1;
      checks += 2;
      if (rd1 !== shadow[a1[7:2]]) begin failures++; $display("FAIL rd1 a=%h", a1); end
      if (rd2 !== shadow[a2[7:2]]) begin failures++; $display("FAIL rd2 a=%h", a2); end
      @(posedge clk);
      if (we1) shadow[a1[7:2]] = wd1;
      if (we2) shadow[a2[7:2]] = wd2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
