// Hazard unit of the two-lane pipeline.
//
// Forwarding: for each of the four Execute operands (rs and rt of lane 1 and
// lane 2) it selects the newest in-flight value of that register among the
// Memory and Write-back stages of both lanes. This gives the within-lane
// Memory->Execute and Write-back->Execute paths and the cross-lane paths of
// the same kind in both directions (lane 2 to lane 1 and lane 1 to lane 2).
// Program order decides between several matches: Memory before Write-back,
// and within a stage lane 2 (the second instruction of the pair) before
// lane 1. For the lane-1 branch comparator in Decode it forwards ALUOutM2 or
// ALUOutM1 in the same way.
//
// Stalls: a load in Execute of either lane whose destination is a source of
// either Decode instruction stalls Fetch and Decode for one cycle and puts a
// bubble in both Execute stages. So does a lane-1 branch whose operand is
// still being computed in Execute (either lane) or loaded in Memory (either
// lane). Register 0 never causes a forward or a stall. The document gives the
// forwarding paths and the five-input multiplexers; the priority order and
// the stall conditions, extended from the single-issue pipeline, are this
// design's. Dependencies between the two instructions of one pair are not
// detected. Combinational.
module hazard_unit
  import mips_ss_pkg::*;
(
  // Decode stage sources
  input  logic [4:0] rs_d1, rt_d1, rs_d2, rt_d2,
  input  logic       branch_d1,
  // Execute stage
  input  logic [4:0] rs_e1, rt_e1, rs_e2, rt_e2,
  input  logic [4:0] writereg_e1, writereg_e2,
  input  logic       regwrite_e1, regwrite_e2,
  input  logic       memtoreg_e1, memtoreg_e2,
  // Memory stage
  input  logic [4:0] writereg_m1, writereg_m2,
  input  logic       regwrite_m1, regwrite_m2,
  input  logic       memtoreg_m1, memtoreg_m2,
  // Write-back stage
  input  logic [4:0] writereg_w1, writereg_w2,
  input  logic       regwrite_w1, regwrite_w2,
  // Forwarding selects
  output fwd_sel_t   fwd_ae1, fwd_be1, fwd_ae2, fwd_be2,
  output fwd_d_sel_t fwd_ad1, fwd_bd1,
  // Stall / flush
  output logic       stall_f, stall_d, flush_e,
  output logic       lwstall, branchstall
);

  function automatic fwd_sel_t fwd_e(input logic [4:0] r);
    if (r == '0)                              return FWD_RF;
    else if (regwrite_m2 && writereg_m2 == r) return FWD_M2;
    else if (regwrite_m1 && writereg_m1 == r) return FWD_M1;
    else if (regwrite_w2 && writereg_w2 == r) return FWD_W2;
    else if (regwrite_w1 && writereg_w1 == r) return FWD_W1;
    else                                      return FWD_RF;
  endfunction

  function automatic fwd_d_sel_t fwd_d(input logic [4:0] r);
    if (r == '0)                              return FWDD_RF;
    else if (regwrite_m2 && writereg_m2 == r) return FWDD_M2;
    else if (regwrite_m1 && writereg_m1 == r) return FWDD_M1;
    else                                      return FWDD_RF;
  endfunction

  // destination w (nonzero) is one of the Decode sources listed
  function automatic logic hits(input logic [4:0] w, input logic [4:0] s0, input logic [4:0] s1);
    return (w != '0) && (w == s0 || w == s1);
  endfunction

  assign fwd_ae1 = fwd_e(rs_e1);
  assign fwd_be1 = fwd_e(rt_e1);
  assign fwd_ae2 = fwd_e(rs_e2);
  assign fwd_be2 = fwd_e(rt_e2);
  assign fwd_ad1 = fwd_d(rs_d1);
  assign fwd_bd1 = fwd_d(rt_d1);

  assign lwstall =
      (memtoreg_e1 && (hits(writereg_e1, rs_d1, rt_d1) || hits(writereg_e1, rs_d2, rt_d2))) ||
      (memtoreg_e2 && (hits(writereg_e2, rs_d1, rt_d1) || hits(writereg_e2, rs_d2, rt_d2)));

  assign branchstall = branch_d1 && (
      (regwrite_e1 && hits(writereg_e1, rs_d1, rt_d1)) ||
      (regwrite_e2 && hits(writereg_e2, rs_d1, rt_d1)) ||
      (memtoreg_m1 && hits(writereg_m1, rs_d1, rt_d1)) ||
      (memtoreg_m2 && hits(writereg_m2, rs_d1, rt_d1)));

  assign stall_f = lwstall || branchstall;
  assign stall_d = stall_f;
  assign flush_e = stall_f;

endmodule
