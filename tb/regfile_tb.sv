// Self-checking test of the shared register file: random two-lane writes and
// four-port reads against a shadow array, including same-cycle write-through,
// register 0 and both lanes writing one register (lane 2 must win).
module regfile_tb;
  logic clk = 0;
  logic [4:0]  ra1, ra2, ra3, ra4, wa1, wa2;
  logic [31:0] rd1, rd2, rd3, rd4, wd1, wd2;
  logic        we1, we2;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .ra1, .ra2, .ra3, .ra4, .rd1, .rd2, .rd3, .rd4,
               .we1, .wa1, .wd1, .we2, .wa2, .wd2);

  always #5 clk = ~clk;

  function automatic logic [31:0] expect_rd(logic [4:0] r);
    if (r == 0) return 0;
    if (we2 && wa2 == r) return wd2;
    if (we1 && wa1 == r) return wd1;
    return shadow[r];
  endfunction

  task automatic chk(string p, logic [4:0] r, logic [31:0] got);
    checks++;
    if (got !== expect_rd(r)) begin
      failures++; $display("FAIL %s r%0d got %h exp %h", p, r, got, expect_rd(r));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = 0;
    we1 = 0; we2 = 0; wa1 = 0; wa2 = 0; wd1 = 0; wd2 = 0;
    repeat (2000) begin
      @(negedge clk);
      we1 = 1'($urandom); we2 = 1'($urandom);
      wa1 = 5'($urandom_range(0, 7)); wa2 = ($urandom_range(0, 3) == 0) ? wa1 : 5'($urandom_range(0, 7));
      wd1 = $urandom; wd2 = $urandom;
      ra1 = 5'($urandom_range(0, 7)); ra2 = 5'($urandom_range(0, 7));
      ra3 = ($urandom_range(0, 1) == 1) ? wa1 : wa2; ra4 = 5'($urandom_range(0, 31));
      #1;
      chk("rd1", ra1, rd1); chk("rd2", ra2, rd2); chk("rd3", ra3, rd3); chk("rd4", ra4, rd4);
      @(posedge clk);
      if (we1 && wa1 != 0) shadow[wa1] = wd1;
      if (we2 && wa2 != 0) shadow[wa2] = wd2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
