// Data memory shared by the two lanes.
//
// Word-addressed by the byte address bits [AW+1:2]; two ports, one for the
// Memory stage of each lane. Reads are combinational, writes happen at the
// rising clock edge. If both lanes store to one word in the same cycle, lane 2
// (the later instruction) wins. The document says there is one data memory
// block; the two ports, the depth of 64 words and the lane-2 priority are
// this design's choices. A load in lane 2 does not see a store made by lane 1
// of the same pair, which is one of the in-pair dependencies the pipeline
// leaves to the program.
module dmem #(
  parameter int unsigned WORDS = 64,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        we1,
  input  logic [31:0] a1,
  input  logic [31:0] wd1,
  output logic [31:0] rd1,
  input  logic        we2,
  input  logic [31:0] a2,
  input  logic [31:0] wd2,
  output logic [31:0] rd2
);

  logic [31:0] ram [WORDS];

  initial for (int i = 0; i < WORDS; i++) ram[i] = '0;

  always_ff @(posedge clk) begin
    if (we1) ram[a1[AW+1:2]] <= wd1;
    if (we2) ram[a2[AW+1:2]] <= wd2;
  end

  assign rd1 = ram[a1[AW+1:2]];
  assign rd2 = ram[a2[AW+1:2]];

endmodule
