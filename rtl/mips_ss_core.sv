// Two-way superscalar MIPS pipeline core (without its memories).
//
// Fetch reads an instruction pair at PCF: bits 63:32 go to lane 1, bits 31:0
// to lane 2, and PC advances by 8. Each lane then has its own Decode,
// Execute, Memory and Write-back stages with their own pipeline registers,
// control unit, sign extension and ALU; the register file is shared (four
// reads, two writes) and the data memory, outside this module, has one port
// per lane. The hazard unit feeds four five-input forwarding multiplexers in
// Execute with values from the Memory and Write-back stages of both lanes, and
// stalls both lanes together on a load-use or branch-operand hazard.
//
// Branch (beq) and jump (j) are only decoded on lane 1, i.e. as the first
// instruction of a pair. They resolve in Decode: a taken beq goes to
// (sign-extended immediate << 2) + PC + 4 and j to {PC+4[31:28], target, 00};
// the pair fetched behind them is discarded, while the lane-2 instruction
// decoded together with the branch completes as a delay slot. The taken-branch
// penalty is thus one pair.
//
// Timing: one pair enters per cycle; a result reaches Write-back four cycles
// after its pair is fetched; a load-use hazard costs one cycle, and so does a
// branch whose operand is in Execute or is a load in Memory. Reset is
// synchronous and clears PC and all pipeline registers.
//
// From the document: pair fetch and bit split, doubled lanes, PC+8 and PC+4
// branch target, lane-1-only branch and jump, five-input cross-lane
// forwarding. This design's choices: the stall rules, the delay slot, the jump
// target, Decode-stage forwarding for the branch comparator, and leaving
// dependencies inside one pair unchecked (the program must avoid them).
module mips_ss_core
  import mips_ss_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  // instruction memory
  output logic [31:0] pcf,
  input  logic [63:0] instr_f,
  // data memory, lane 1
  output logic        memwrite_m1,
  output logic [31:0] aluout_m1,
  output logic [31:0] writedata_m1,
  input  logic [31:0] readdata_m1,
  // data memory, lane 2
  output logic        memwrite_m2,
  output logic [31:0] aluout_m2,
  output logic [31:0] writedata_m2,
  input  logic [31:0] readdata_m2,
  // write-back observation
  output logic [31:0] result_w1,
  output logic [31:0] result_w2,
  output logic [4:0]  writereg_w1,
  output logic [4:0]  writereg_w2,
  output logic        regwrite_w1,
  output logic        regwrite_w2
);

  // ---------------------------------------------------------------- hazard
  logic       stall_f, stall_d, flush_e, lwstall, branchstall;
  fwd_sel_t   fwd_ae1, fwd_be1, fwd_ae2, fwd_be2;
  fwd_d_sel_t fwd_ad1, fwd_bd1;

  // ---------------------------------------------------------------- fetch
  logic [31:0] pc_next, pcplus4_f, pcplus8_f, pcbranch_d, pcjump_d;
  logic        pcsrc_d, jump_d, redirect_d;

  assign pcplus4_f = pcf + 32'd4;
  assign pcplus8_f = pcf + 32'd8;

  always_comb begin
    if (jump_d)       pc_next = pcjump_d;
    else if (pcsrc_d) pc_next = pcbranch_d;
    else              pc_next = pcplus8_f;
  end

  always_ff @(posedge clk) begin
    if (reset)         pcf <= '0;
    else if (!stall_f) pcf <= pc_next;
  end

  fd_t fd_d1_in, fd_d2_in, fd1, fd2;
  assign fd_d1_in = '{instr: instr_f[63:32], pcplus4: pcplus4_f};
  assign fd_d2_in = '{instr: instr_f[31:0],  pcplus4: pcplus8_f};
  assign redirect_d = pcsrc_d | jump_d;

  pipe_reg #(.T(fd_t)) u_fd1 (.clk, .reset, .en(!stall_d), .clr(redirect_d), .d(fd_d1_in), .q(fd1));
  pipe_reg #(.T(fd_t)) u_fd2 (.clk, .reset, .en(!stall_d), .clr(redirect_d), .d(fd_d2_in), .q(fd2));

  // ---------------------------------------------------------------- decode
  ctrl_t       ctrl_d1, ctrl_d2;
  logic [31:0] rf_rd1, rf_rd2, rf_rd3, rf_rd4;
  logic [31:0] cmp_a, cmp_b;
  logic [31:0] result_w1_i, result_w2_i;
  em_t         em1, em2;
  mw_t         mw1, mw2;

  control_unit #(.BRANCH_EN(1'b1)) u_cu1 (.op(fd1.instr[31:26]), .funct(fd1.instr[5:0]), .ctrl(ctrl_d1));
  control_unit #(.BRANCH_EN(1'b0)) u_cu2 (.op(fd2.instr[31:26]), .funct(fd2.instr[5:0]), .ctrl(ctrl_d2));

  regfile u_rf (
    .clk,
    .ra1(fd1.instr[25:21]), .ra2(fd1.instr[20:16]),
    .ra3(fd2.instr[25:21]), .ra4(fd2.instr[20:16]),
    .rd1(rf_rd1), .rd2(rf_rd2), .rd3(rf_rd3), .rd4(rf_rd4),
    .we1(mw1.regwrite), .wa1(mw1.writereg), .wd1(result_w1_i),
    .we2(mw2.regwrite), .wa2(mw2.writereg), .wd2(result_w2_i)
  );

  always_comb begin
    unique case (fwd_ad1)
      FWDD_M1: cmp_a = em1.aluout;
      FWDD_M2: cmp_a = em2.aluout;
      default: cmp_a = rf_rd1;
    endcase
    unique case (fwd_bd1)
      FWDD_M1: cmp_b = em1.aluout;
      FWDD_M2: cmp_b = em2.aluout;
      default: cmp_b = rf_rd2;
    endcase
  end

  branch_unit u_br (
    .imm(fd1.instr[15:0]), .pcplus4(fd1.pcplus4), .a(cmp_a), .b(cmp_b),
    .branch(ctrl_d1.branch & ~stall_d), .pcsrc(pcsrc_d), .pcbranch(pcbranch_d)
  );

  assign jump_d   = ctrl_d1.jump & ~stall_d;
  assign pcjump_d = {fd1.pcplus4[31:28], fd1.instr[25:0], 2'b00};

  de_t de_d1_in, de_d2_in, de1, de2;
  assign de_d1_in = '{ctrl: ctrl_d1, rd1: rf_rd1, rd2: rf_rd2,
                      rs: fd1.instr[25:21], rt: fd1.instr[20:16], rd: fd1.instr[15:11],
                      signimm: {{16{fd1.instr[15]}}, fd1.instr[15:0]}};
  assign de_d2_in = '{ctrl: ctrl_d2, rd1: rf_rd3, rd2: rf_rd4,
                      rs: fd2.instr[25:21], rt: fd2.instr[20:16], rd: fd2.instr[15:11],
                      signimm: {{16{fd2.instr[15]}}, fd2.instr[15:0]}};

  pipe_reg #(.T(de_t)) u_de1 (.clk, .reset, .en(1'b1), .clr(flush_e), .d(de_d1_in), .q(de1));
  pipe_reg #(.T(de_t)) u_de2 (.clk, .reset, .en(1'b1), .clr(flush_e), .d(de_d2_in), .q(de2));

  // ---------------------------------------------------------------- execute
  logic [31:0] srca_e1, wdata_e1, srcb_e1, aluout_e1;
  logic [31:0] srca_e2, wdata_e2, srcb_e2, aluout_e2;
  logic [4:0]  writereg_e1, writereg_e2;
  logic        zero_e1, zero_e2;

  fwd_mux u_fa1 (.sel(fwd_ae1), .rf(de1.rd1), .m1(em1.aluout), .m2(em2.aluout), .w1(result_w1_i), .w2(result_w2_i), .y(srca_e1));
  fwd_mux u_fb1 (.sel(fwd_be1), .rf(de1.rd2), .m1(em1.aluout), .m2(em2.aluout), .w1(result_w1_i), .w2(result_w2_i), .y(wdata_e1));
  fwd_mux u_fa2 (.sel(fwd_ae2), .rf(de2.rd1), .m1(em1.aluout), .m2(em2.aluout), .w1(result_w1_i), .w2(result_w2_i), .y(srca_e2));
  fwd_mux u_fb2 (.sel(fwd_be2), .rf(de2.rd2), .m1(em1.aluout), .m2(em2.aluout), .w1(result_w1_i), .w2(result_w2_i), .y(wdata_e2));

  assign srcb_e1     = de1.ctrl.alusrc ? de1.signimm : wdata_e1;
  assign srcb_e2     = de2.ctrl.alusrc ? de2.signimm : wdata_e2;
  assign writereg_e1 = de1.ctrl.regdst ? de1.rd : de1.rt;
  assign writereg_e2 = de2.ctrl.regdst ? de2.rd : de2.rt;

  alu u_alu1 (.a(srca_e1), .b(srcb_e1), .ctrl(de1.ctrl.alucontrol), .y(aluout_e1), .zero(zero_e1));
  alu u_alu2 (.a(srca_e2), .b(srcb_e2), .ctrl(de2.ctrl.alucontrol), .y(aluout_e2), .zero(zero_e2));

  em_t em_e1_in, em_e2_in;
  assign em_e1_in = '{regwrite: de1.ctrl.regwrite, memtoreg: de1.ctrl.memtoreg, memwrite: de1.ctrl.memwrite,
                      aluout: aluout_e1, writedata: wdata_e1, writereg: writereg_e1};
  assign em_e2_in = '{regwrite: de2.ctrl.regwrite, memtoreg: de2.ctrl.memtoreg, memwrite: de2.ctrl.memwrite,
                      aluout: aluout_e2, writedata: wdata_e2, writereg: writereg_e2};

  pipe_reg #(.T(em_t)) u_em1 (.clk, .reset, .en(1'b1), .clr(1'b0), .d(em_e1_in), .q(em1));
  pipe_reg #(.T(em_t)) u_em2 (.clk, .reset, .en(1'b1), .clr(1'b0), .d(em_e2_in), .q(em2));

  // ---------------------------------------------------------------- memory
  assign memwrite_m1  = em1.memwrite;
  assign aluout_m1    = em1.aluout;
  assign writedata_m1 = em1.writedata;
  assign memwrite_m2  = em2.memwrite;
  assign aluout_m2    = em2.aluout;
  assign writedata_m2 = em2.writedata;

  mw_t mw_m1_in, mw_m2_in;
  assign mw_m1_in = '{regwrite: em1.regwrite, memtoreg: em1.memtoreg, readdata: readdata_m1,
                      aluout: em1.aluout, writereg: em1.writereg};
  assign mw_m2_in = '{regwrite: em2.regwrite, memtoreg: em2.memtoreg, readdata: readdata_m2,
                      aluout: em2.aluout, writereg: em2.writereg};

  pipe_reg #(.T(mw_t)) u_mw1 (.clk, .reset, .en(1'b1), .clr(1'b0), .d(mw_m1_in), .q(mw1));
  pipe_reg #(.T(mw_t)) u_mw2 (.clk, .reset, .en(1'b1), .clr(1'b0), .d(mw_m2_in), .q(mw2));

  // ---------------------------------------------------------------- write-back
  assign result_w1_i = mw1.memtoreg ? mw1.readdata : mw1.aluout;
  assign result_w2_i = mw2.memtoreg ? mw2.readdata : mw2.aluout;
  assign result_w1   = result_w1_i;
  assign result_w2   = result_w2_i;
  assign writereg_w1 = mw1.writereg;
  assign writereg_w2 = mw2.writereg;
  assign regwrite_w1 = mw1.regwrite;
  assign regwrite_w2 = mw2.regwrite;

  hazard_unit u_hz (
    .rs_d1(fd1.instr[25:21]), .rt_d1(fd1.instr[20:16]),
    .rs_d2(fd2.instr[25:21]), .rt_d2(fd2.instr[20:16]),
    .branch_d1(ctrl_d1.branch),
    .rs_e1(de1.rs), .rt_e1(de1.rt), .rs_e2(de2.rs), .rt_e2(de2.rt),
    .writereg_e1, .writereg_e2,
    .regwrite_e1(de1.ctrl.regwrite), .regwrite_e2(de2.ctrl.regwrite),
    .memtoreg_e1(de1.ctrl.memtoreg), .memtoreg_e2(de2.ctrl.memtoreg),
    .writereg_m1(em1.writereg), .writereg_m2(em2.writereg),
    .regwrite_m1(em1.regwrite), .regwrite_m2(em2.regwrite),
    .memtoreg_m1(em1.memtoreg), .memtoreg_m2(em2.memtoreg),
    .writereg_w1(mw1.writereg), .writereg_w2(mw2.writereg),
    .regwrite_w1(mw1.regwrite), .regwrite_w2(mw2.regwrite),
    .fwd_ae1, .fwd_be1, .fwd_ae2, .fwd_be2, .fwd_ad1, .fwd_bd1,
    .stall_f, .stall_d, .flush_e, .lwstall, .branchstall
  );

  // Control unit 2 never asserts branch or jump.
  a_lane2_no_branch: assert property (@(posedge clk) disable iff (reset) !(ctrl_d2.branch || ctrl_d2.jump));

endmodule
