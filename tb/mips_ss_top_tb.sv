// End-to-end test of the two-way superscalar MIPS processor at its default
// sizes (64-word instruction and data memories).
//
// Four parts:
//  0. The default program of the instruction memory (a branch example with a
//     load-use pair) runs as loaded at start-up; final registers are checked.
//  1. Throughput: twelve independent instructions (six pairs) must retire in
//     six consecutive cycles, two per cycle (CPI 0.5), the first pair in
//     Write-back four clock edges after it was fetched.
//  2. The branch example of the design notes: beq in the first slot, addi in
//     the second, target label holding sw and add; the branch offset counts
//     from the beq address + 4 although the PC normally advances by 8.
//  3. Random programs: straight-line pairs with forward branches and jumps,
//     generated to obey the pipeline's rules (branches only in the first
//     slot, no dependency inside a pair), ending in a jump to itself. After
//     each run the register file and data memory are compared with the
//     sequential reference model of mips_asm_pkg.
// Every hazard mechanism is counted: load-use stall, branch stall, taken and
// not-taken branch, jump, each of the eight Execute forwarding paths (lane x
// source), branch-comparator forwarding and two results retiring in one
// cycle. A mechanism that never occurs counts as a failure.
module mips_ss_top_tb;
  import mips_ss_pkg::*;
  import mips_asm_pkg::*;

  localparam int IW = 64, DW = 64;

  logic clk = 0, reset = 1;
  logic [31:0] result_w1, result_w2;
  logic [4:0]  writereg_w1, writereg_w2;
  logic        regwrite_w1, regwrite_w2;
  int checks = 0, failures = 0;
  int cycle = 0;

  mips_ss_top dut (.clk, .reset, .result_w1, .result_w2, .writereg_w1, .writereg_w2,
                   .regwrite_w1, .regwrite_w2);

  always #5 clk = ~clk;

  // ------------------------------------------------------------ mechanisms
  typedef enum int {
    MC_LWSTALL, MC_BRSTALL, MC_TAKEN, MC_NOTTAKEN, MC_JUMP,
    MC_F1_M1, MC_F1_M2, MC_F1_W1, MC_F1_W2, MC_F2_M1, MC_F2_M2, MC_F2_W1, MC_F2_W2,
    MC_FWD_D, MC_DUAL_WB, MC_N
  } mech_t;
  int mech [MC_N];
  string mech_name [MC_N] = '{"load-use stall", "branch stall", "taken branch", "not-taken branch",
    "jump", "lane1<-M1", "lane1<-M2 (cross)", "lane1<-W1", "lane1<-W2 (cross)",
    "lane2<-M1 (cross)", "lane2<-M2", "lane2<-W1 (cross)", "lane2<-W2", "branch operand forward",
    "dual write-back"};

  function automatic void count_fwd(int lane, fwd_sel_t s);
    int base = (lane == 1) ? MC_F1_M1 : MC_F2_M1;
    case (s)
      FWD_M1: mech[base + 0]++;
      FWD_M2: mech[base + 1]++;
      FWD_W1: mech[base + 2]++;
      FWD_W2: mech[base + 3]++;
      default: ;
    endcase
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!reset) begin
      if (dut.u_core.lwstall) mech[MC_LWSTALL]++;
      if (dut.u_core.branchstall) mech[MC_BRSTALL]++;
      if (dut.u_core.pcsrc_d) mech[MC_TAKEN]++;
      if (dut.u_core.ctrl_d1.branch && !dut.u_core.stall_d && !dut.u_core.pcsrc_d) mech[MC_NOTTAKEN]++;
      if (dut.u_core.jump_d && dut.u_core.pcjump_d != dut.u_core.fd1.pcplus4 - 32'd4) mech[MC_JUMP]++;  // not the halt loop
      count_fwd(1, dut.u_core.fwd_ae1); count_fwd(1, dut.u_core.fwd_be1);
      count_fwd(2, dut.u_core.fwd_ae2); count_fwd(2, dut.u_core.fwd_be2);
      if (dut.u_core.ctrl_d1.branch && (dut.u_core.fwd_ad1 != FWDD_RF || dut.u_core.fwd_bd1 != FWDD_RF))
        mech[MC_FWD_D]++;
      if (regwrite_w1 && regwrite_w2 && writereg_w1 != 0 && writereg_w2 != 0) mech[MC_DUAL_WB]++;
    end
  end

  // ------------------------------------------------------------ helpers
  logic [31:0] prog [];

  task automatic load_and_reset();
    reset = 1;
    for (int i = 0; i < IW; i++) dut.u_imem.ram[i] = (i < prog.size()) ? prog[i] : NOP;
    repeat (2) @(posedge clk);
    #1 reset = 0;
  endtask

  // runs the loaded program for n cycles and compares with the model
  task automatic run_and_compare(string nm, int n_cycles);
    isa_model m = new(DW);
    bit ok;
    for (int r = 0; r < 32; r++) m.regs[r] = dut.u_core.u_rf.rf[r];
    for (int w = 0; w < DW; w++) m.mem[w] = dut.u_dmem.ram[w];
    m.regs[0] = 0;
    ok = m.run(prog, 4 * IW);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: reference model did not halt", nm); end
    load_and_reset();
    repeat (n_cycles) @(posedge clk);
    for (int r = 1; r < 32; r++) begin
      checks++;
      if (dut.u_core.u_rf.rf[r] !== m.regs[r]) begin
        failures++;
        $display("FAIL %s: $%0d = %h, expected %h", nm, r, dut.u_core.u_rf.rf[r], m.regs[r]);
      end
    end
    for (int w = 0; w < DW; w++) begin
      checks++;
      if (dut.u_dmem.ram[w] !== m.mem[w]) begin
        failures++;
        $display("FAIL %s: mem[%0d] = %h, expected %h", nm, w, dut.u_dmem.ram[w], m.mem[w]);
      end
    end
  endtask

  // ------------------------------------------------------------ random programs
  function automatic int rreg();
    return $urandom_range(1, 6);
  endfunction

  // a random non-control instruction; dst returns the register it writes (0: none)
  function automatic logic [31:0] rand_alu_mem(output int dst, output bit is_sw, output bit is_lw);
    int k = $urandom_range(0, 9);
    is_sw = 0; is_lw = 0;
    if (k < 4) begin
      logic [5:0] fns [5] = '{F_ADD, F_SUB, F_AND, F_OR, F_SLT};
      dst = rreg();
      return enc_r(fns[$urandom_range(0, 4)], dst, rreg(), rreg());
    end else if (k < 6) begin
      dst = rreg();
      return enc_i(OP_ADDI, dst, ($urandom_range(0, 3) == 0) ? 0 : rreg(), $urandom_range(0, 40) - 20);
    end else if (k < 8) begin
      dst = rreg(); is_lw = 1;
      return enc_i(OP_LW, dst, 0, 4 * $urandom_range(0, 7));
    end else begin
      dst = 0; is_sw = 1;
      return enc_i(OP_SW, rreg(), 0, 4 * $urandom_range(0, 7));
    end
  endfunction

  function automatic void gen_program(int npairs);
    prog = new[2 * npairs + 2];
    for (int p = 0; p < npairs; p++) begin
      int d1, d2; bit sw1, lw1, sw2, lw2;
      logic [31:0] i1, i2;
      int kind = $urandom_range(0, 9);
      if (kind == 0 || kind == 1) begin          // beq, forward
        int tp = $urandom_range(p + 1, (p + 3 < npairs) ? p + 3 : npairs);
        int ra = rreg(), rb = ($urandom_range(0, 2) == 0) ? ra : rreg();
        i1 = enc_i(OP_BEQ, rb, ra, 2 * tp - (2 * p + 1));
        d1 = 0; sw1 = 0; lw1 = 0;
      end else if (kind == 2) begin              // j, forward
        int tp = $urandom_range(p + 1, (p + 3 < npairs) ? p + 3 : npairs);
        i1 = enc_j(2 * tp);
        d1 = 0; sw1 = 0; lw1 = 0;
      end else begin
        i1 = rand_alu_mem(d1, sw1, lw1);
      end
      // second slot: must not read what the first writes, nor load after its store
      forever begin
        i2 = rand_alu_mem(d2, sw2, lw2);
        if (sw1 && lw2) continue;
        if (d1 != 0 && (int'(i2[25:21]) == d1 || int'(i2[20:16]) == d1)) continue;
        break;
      end
      prog[2 * p] = i1;
      prog[2 * p + 1] = i2;
    end
    prog[2 * npairs] = enc_j(2 * npairs);
    prog[2 * npairs + 1] = NOP;
  endfunction

  // ------------------------------------------------------------ watchdog
  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ main
  initial begin
    int first_wb, dual, c0;

    // 0. the default program of the instruction memory, as loaded at start-up
    #1;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    repeat (40) @(posedge clk);
    #1;
    begin
      int regs_exp [int] = '{16: 1, 9: 33, 8: 34, 10: 0, 11: 1, 12: 7, 13: 35, 14: 27};
      foreach (regs_exp[r]) begin
        checks++;
        if (dut.u_core.u_rf.rf[r] !== 32'(regs_exp[r])) begin
          failures++; $display("FAIL demo program: $%0d = %0d, expected %0d", r, dut.u_core.u_rf.rf[r], regs_exp[r]);
        end
      end
      checks++;
      if (dut.u_dmem.ram[20] !== 32'd1) begin failures++; $display("FAIL demo program: mem[80] = %0d", dut.u_dmem.ram[20]); end
    end

    // 1. throughput: addi $1..$12 in six pairs
    prog = new[14];
    for (int i = 0; i < 12; i++) prog[i] = enc_i(OP_ADDI, i + 1, 0, 100 + i);
    prog[12] = enc_j(12);
    prog[13] = NOP;
    load_and_reset();
    c0 = cycle; first_wb = -1; dual = 0;
    for (int k = 0; k < 20; k++) begin
      @(posedge clk); #1;
      if (regwrite_w1 && regwrite_w2) begin
        if (first_wb < 0) first_wb = cycle - c0;
        dual++;
        checks += 2;
        if (writereg_w1 != 5'(2 * dual - 1) || result_w1 != 32'(100 + 2 * dual - 2)) begin
          failures++; $display("FAIL throughput lane1 $%0d=%0d", writereg_w1, result_w1);
        end
        if (writereg_w2 != 5'(2 * dual) || result_w2 != 32'(100 + 2 * dual - 1)) begin
          failures++; $display("FAIL throughput lane2 $%0d=%0d", writereg_w2, result_w2);
        end
      end else if (first_wb >= 0 && dual < 6) begin
        failures++; $display("FAIL throughput: gap after %0d pairs", dual);
        dual = 6;
      end
    end
    checks += 2;
    if (dual != 6) begin failures++; $display("FAIL throughput: %0d dual write-backs, expected 6", dual); end
    // the pair fetched in the first cycle after reset is in Write-back after 4 edges
    if (first_wb != 4) begin failures++; $display("FAIL latency: first write-back at %0d", first_wb); end
    $display("throughput: 12 instructions retired in %0d cycles (CPI %0.2f)", dual, real'(dual) / 12.0);

    // 2. the branch example: beq $s0,$0,label / addi $s0,$0,1 / ... / label: sw $s0,80($0) / add $t0,$t1,$s0
    prog = new[10];
    prog[0] = enc_i(OP_ADDI, 16, 0, 0);        // $s0 = 0 so that the branch is taken
    prog[1] = enc_i(OP_ADDI, 9, 0, 33);        // $t1 = 33
    prog[2] = enc_i(OP_BEQ, 0, 16, 3);         // to word 2+1+3 = 6
    prog[3] = enc_i(OP_ADDI, 16, 0, 1);        // second slot: executes
    prog[4] = enc_i(OP_ADDI, 8, 0, 77);        // skipped
    prog[5] = enc_i(OP_ADDI, 10, 0, 77);       // skipped
    prog[6] = enc_i(OP_SW, 16, 0, 80);         // label
    prog[7] = enc_r(F_ADD, 8, 9, 16);
    prog[8] = enc_j(8);
    prog[9] = NOP;
    run_and_compare("branch example", 30);
    checks += 3;
    if (dut.u_dmem.ram[20] !== 32'd1) begin failures++; $display("FAIL branch example: mem[80] = %h", dut.u_dmem.ram[20]); end
    if (dut.u_core.u_rf.rf[8] !== 32'd34) begin failures++; $display("FAIL branch example: $t0 = %0d", dut.u_core.u_rf.rf[8]); end
    if (dut.u_core.u_rf.rf[10] === 32'd77) begin failures++; $display("FAIL branch example: skipped pair executed"); end

    // 3. random programs
    for (int t = 0; t < 300; t++) begin
      int np = $urandom_range(4, 30);
      gen_program(np);
      run_and_compare($sformatf("random program %0d", t), 4 * np + 20);
    end

    foreach (mech[i]) begin
      checks++;
      $display("mechanism %-24s %0d", mech_name[i], mech[i]);
      if (mech[i] == 0) begin failures++; $display("FAIL mechanism never exercised: %s", mech_name[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
