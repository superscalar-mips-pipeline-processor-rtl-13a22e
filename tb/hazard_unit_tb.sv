// Self-checking test of the hazard unit. Random register numbers (drawn from
// a small set so that matches are frequent) and control bits are applied;
// the expected forwarding selects are worked out by scanning the in-flight
// producers from oldest (W1) to newest (M2) and keeping the last match, and
// the expected stalls from the load-use and branch-operand rules.
module hazard_unit_tb;
  import mips_ss_pkg::*;
  logic [4:0] rs_d1, rt_d1, rs_d2, rt_d2, rs_e1, rt_e1, rs_e2, rt_e2;
  logic [4:0] wr_e1, wr_e2, wr_m1, wr_m2, wr_w1, wr_w2;
  logic       branch_d1, rw_e1, rw_e2, mr_e1, mr_e2, rw_m1, rw_m2, mr_m1, mr_m2, rw_w1, rw_w2;
  fwd_sel_t   fae1, fbe1, fae2, fbe2;
  fwd_d_sel_t fad1, fbd1;
  logic       stall_f, stall_d, flush_e, lwstall, branchstall;
  int checks = 0, failures = 0;
  int seen [5];

  hazard_unit dut (
    .rs_d1, .rt_d1, .rs_d2, .rt_d2, .branch_d1,
    .rs_e1, .rt_e1, .rs_e2, .rt_e2,
    .writereg_e1(wr_e1), .writereg_e2(wr_e2), .regwrite_e1(rw_e1), .regwrite_e2(rw_e2),
    .memtoreg_e1(mr_e1), .memtoreg_e2(mr_e2),
    .writereg_m1(wr_m1), .writereg_m2(wr_m2), .regwrite_m1(rw_m1), .regwrite_m2(rw_m2),
    .memtoreg_m1(mr_m1), .memtoreg_m2(mr_m2),
    .writereg_w1(wr_w1), .writereg_w2(wr_w2), .regwrite_w1(rw_w1), .regwrite_w2(rw_w2),
    .fwd_ae1(fae1), .fwd_be1(fbe1), .fwd_ae2(fae2), .fwd_be2(fbe2), .fwd_ad1(fad1), .fwd_bd1(fbd1),
    .stall_f, .stall_d, .flush_e, .lwstall, .branchstall);

  function automatic fwd_sel_t ref_e(logic [4:0] r);
    fwd_sel_t s = FWD_RF;
    if (r == 0) return FWD_RF;
    if (rw_w1 && wr_w1 == r) s = FWD_W1;
    if (rw_w2 && wr_w2 == r) s = FWD_W2;
    if (rw_m1 && wr_m1 == r) s = FWD_M1;
    if (rw_m2 && wr_m2 == r) s = FWD_M2;
    return s;
  endfunction

  function automatic fwd_d_sel_t ref_d(logic [4:0] r);
    fwd_d_sel_t s = FWDD_RF;
    if (r == 0) return FWDD_RF;
    if (rw_m1 && wr_m1 == r) s = FWDD_M1;
    if (rw_m2 && wr_m2 == r) s = FWDD_M2;
    return s;
  endfunction

  function automatic logic uses_d1(logic [4:0] w);
    return w != 0 && (w == rs_d1 || w == rt_d1);
  endfunction
  function automatic logic uses_d(logic [4:0] w);
    return uses_d1(w) || (w != 0 && (w == rs_d2 || w == rt_d2));
  endfunction

  task automatic chk(string nm, int got, int exp_v);
    checks++;
    if (got != exp_v) begin failures++; $display("FAIL %s got %0d exp %0d", nm, got, exp_v); end
  endtask

  function automatic logic [4:0] rr();
    return 5'($urandom_range(0, 5));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_lw, exp_br;
    repeat (5000) begin
      {rs_d1, rt_d1, rs_d2, rt_d2} = {rr(), rr(), rr(), rr()};
      {rs_e1, rt_e1, rs_e2, rt_e2} = {rr(), rr(), rr(), rr()};
      {wr_e1, wr_e2, wr_m1, wr_m2, wr_w1, wr_w2} = {rr(), rr(), rr(), rr(), rr(), rr()};
      {branch_d1, rw_e1, rw_e2, mr_e1, mr_e2, rw_m1, rw_m2, mr_m1, mr_m2, rw_w1, rw_w2} = 11'($urandom);
      #1;
      chk("fae1", fae1, ref_e(rs_e1)); chk("fbe1", fbe1, ref_e(rt_e1));
      chk("fae2", fae2, ref_e(rs_e2)); chk("fbe2", fbe2, ref_e(rt_e2));
      chk("fad1", fad1, ref_d(rs_d1)); chk("fbd1", fbd1, ref_d(rt_d1));
      seen[ref_e(rs_e1)]++;
      exp_lw = (mr_e1 && uses_d(wr_e1)) || (mr_e2 && uses_d(wr_e2));
      exp_br = branch_d1 && ((rw_e1 && uses_d1(wr_e1)) || (rw_e2 && uses_d1(wr_e2)) ||
                             (mr_m1 && uses_d1(wr_m1)) || (mr_m2 && uses_d1(wr_m2)));
      chk("lwstall", lwstall, exp_lw);
      chk("branchstall", branchstall, exp_br);
      chk("stall_f", stall_f, exp_lw || exp_br);
      chk("stall_d", stall_d, exp_lw || exp_br);
      chk("flush_e", flush_e, exp_lw || exp_br);
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL select %0d never exercised", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
