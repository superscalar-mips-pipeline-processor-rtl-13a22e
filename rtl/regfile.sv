// Register file shared by the two lanes.
//
// 32 registers of 32 bits; register 0 always reads as zero. Four
// combinational read ports serve rs and rt of both lanes in Decode; two write
// ports take the Write-back results of lane 1 and lane 2 at the rising clock
// edge. A read of a register being written in the same cycle returns the new
// value, which stands in for the first-half-cycle write of the classic
// pipeline. If both lanes write one register, lane 2 wins, since it holds the
// later instruction of the pair. The document only says there is one register
// file; the port count, the write-through and the lane-2 priority are this
// design's choices.
module regfile #(
  parameter int unsigned N_REGS = 32,
  parameter int unsigned W      = 32,
  localparam int unsigned AW    = $clog2(N_REGS)
) (
  input  logic          clk,
  input  logic [AW-1:0] ra1,
  input  logic [AW-1:0] ra2,
  input  logic [AW-1:0] ra3,
  input  logic [AW-1:0] ra4,
  output logic [W-1:0]  rd1,
  output logic [W-1:0]  rd2,
  output logic [W-1:0]  rd3,
  output logic [W-1:0]  rd4,
  input  logic          we1,
  input  logic [AW-1:0] wa1,
  input  logic [W-1:0]  wd1,
  input  logic          we2,
  input  logic [AW-1:0] wa2,
  input  logic [W-1:0]  wd2
);

  logic [W-1:0] rf [N_REGS];

  initial for (int i = 0; i < N_REGS; i++) rf[i] = '0;

  always_ff @(posedge clk) begin
    if (we1 && wa1 != '0) rf[wa1] <= wd1;
    if (we2 && wa2 != '0) rf[wa2] <= wd2;   // later in program order: wins
  end

  function automatic logic [W-1:0] rd(input logic [AW-1:0] ra);
    if (ra == '0)               return '0;
    else if (we2 && wa2 == ra)  return wd2;
    else if (we1 && wa1 == ra)  return wd1;
    else                        return rf[ra];
  endfunction

  assign rd1 = rd(ra1);
  assign rd2 = rd(ra2);
  assign rd3 = rd(ra3);
  assign rd4 = rd(ra4);

endmodule
