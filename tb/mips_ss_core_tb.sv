// Cycle-exact test of the pipeline core, with the instruction and data
// memories modelled in the testbench.
//
// Four short programs are run and the write-back of each lane is compared
// edge by edge with a hand-worked schedule:
//   A  cross-lane forwarding: consumers in the next pair read lane-1 and
//      lane-2 results from Memory and Write-back without any stall;
//   B  load-use: a use of a load result in the next pair costs one bubble;
//   C  taken branch: the second-slot instruction completes, the pair fetched
//      behind the branch is dropped (one bubble), execution resumes at the
//      target counted from the beq address + 4;
//   D  branch stall: a beq whose operands are still in Execute waits one
//      cycle, then takes them forwarded from Memory.
module mips_ss_core_tb;
  import mips_asm_pkg::*;

  logic clk = 0, reset = 1;
  logic [31:0] pcf, aluout_m1, writedata_m1, readdata_m1, aluout_m2, writedata_m2, readdata_m2;
  logic [63:0] instr_f;
  logic        memwrite_m1, memwrite_m2;
  logic [31:0] result_w1, result_w2;
  logic [4:0]  writereg_w1, writereg_w2;
  logic        regwrite_w1, regwrite_w2;
  int checks = 0, failures = 0;

  logic [31:0] im [64];
  logic [31:0] dm [64];

  mips_ss_core dut (.clk, .reset, .pcf, .instr_f,
    .memwrite_m1, .aluout_m1, .writedata_m1, .readdata_m1,
    .memwrite_m2, .aluout_m2, .writedata_m2, .readdata_m2,
    .result_w1, .result_w2, .writereg_w1, .writereg_w2, .regwrite_w1, .regwrite_w2);

  always #5 clk = ~clk;

  assign instr_f     = {im[pcf[7:2]], im[6'(pcf[7:2] + 6'd1)]};
  assign readdata_m1 = dm[aluout_m1[7:2]];
  assign readdata_m2 = dm[aluout_m2[7:2]];
  always @(posedge clk) begin
    if (memwrite_m1) dm[aluout_m1[7:2]] <= writedata_m1;
    if (memwrite_m2) dm[aluout_m2[7:2]] <= writedata_m2;
  end

  // expected write-back per edge: reg 0 means no register written
  int e1_reg [16], e2_reg [16];
  logic [31:0] e1_val [16], e2_val [16];

  task automatic clear_expect();
    foreach (e1_reg[i]) begin e1_reg[i] = 0; e2_reg[i] = 0; e1_val[i] = 0; e2_val[i] = 0; end
  endtask

  task automatic expect_wb(int edge_n, int lane, int r, logic [31:0] v);
    if (lane == 1) begin e1_reg[edge_n] = r; e1_val[edge_n] = v; end
    else           begin e2_reg[edge_n] = r; e2_val[edge_n] = v; end
  endtask

  task automatic run(string nm, logic [31:0] p []);
    foreach (im[i]) im[i] = (i < p.size()) ? p[i] : NOP;
    reset = 1;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int k = 1; k < 16; k++) begin
      int g1, g2;
      @(posedge clk); #1;
      g1 = (regwrite_w1 && writereg_w1 != 0) ? int'(writereg_w1) : 0;
      g2 = (regwrite_w2 && writereg_w2 != 0) ? int'(writereg_w2) : 0;
      checks += 2;
      if (g1 != e1_reg[k] || (g1 != 0 && result_w1 !== e1_val[k])) begin
        failures++;
        $display("FAIL %s edge %0d lane1: $%0d=%h, expected $%0d=%h", nm, k, g1, result_w1, e1_reg[k], e1_val[k]);
      end
      if (g2 != e2_reg[k] || (g2 != 0 && result_w2 !== e2_val[k])) begin
        failures++;
        $display("FAIL %s edge %0d lane2: $%0d=%h, expected $%0d=%h", nm, k, g2, result_w2, e2_reg[k], e2_val[k]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (dm[i]) dm[i] = 0;

    // A: cross-lane forwarding, no stall
    clear_expect();
    expect_wb(4, 1, 1, 5);  expect_wb(4, 2, 2, 7);
    expect_wb(5, 1, 3, 14); expect_wb(5, 2, 4, 10);
    expect_wb(6, 1, 5, 4);  expect_wb(6, 2, 6, 7);
    run("A", '{enc_i(OP_ADDI, 1, 0, 5), enc_i(OP_ADDI, 2, 0, 7),
               enc_r(F_ADD, 3, 2, 2),   enc_r(F_ADD, 4, 1, 1),
               enc_r(F_SUB, 5, 3, 4),   enc_r(F_OR, 6, 1, 2),
               enc_j(6), NOP});

    // B: load-use stall of one cycle
    dm[1] = 32'h55;
    clear_expect();
    expect_wb(4, 1, 1, 32'h55); expect_wb(4, 2, 2, 1);
    expect_wb(6, 1, 3, 32'h56); expect_wb(6, 2, 4, 9);
    run("B", '{enc_i(OP_LW, 1, 0, 4),  enc_i(OP_ADDI, 2, 0, 1),
               enc_r(F_ADD, 3, 1, 2),  enc_i(OP_ADDI, 4, 0, 9),
               enc_j(4), NOP});

    // C: taken branch, second slot executes, one pair dropped
    clear_expect();
    expect_wb(4, 2, 1, 1);
    expect_wb(6, 1, 4, 4); expect_wb(6, 2, 5, 5);
    run("C", '{enc_i(OP_BEQ, 0, 0, 3),  enc_i(OP_ADDI, 1, 0, 1),
               enc_i(OP_ADDI, 2, 0, 2), enc_i(OP_ADDI, 3, 0, 3),
               enc_i(OP_ADDI, 4, 0, 4), enc_i(OP_ADDI, 5, 0, 5),
               enc_j(6), NOP});

    // D: branch waits one cycle for operands computed by the previous pair
    clear_expect();
    expect_wb(4, 1, 1, 3); expect_wb(4, 2, 2, 3);
    expect_wb(8, 1, 5, 5);
    run("D", '{enc_i(OP_ADDI, 1, 0, 3), enc_i(OP_ADDI, 2, 0, 3),
               enc_i(OP_BEQ, 2, 1, 1),  NOP,
               enc_i(OP_ADDI, 5, 0, 5), NOP,
               enc_j(6), NOP});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
