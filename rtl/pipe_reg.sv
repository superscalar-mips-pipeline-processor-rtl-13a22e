// Pipeline register with stall and flush.
//
// One type-parameterised register serves all eight pipeline registers of the
// two lanes (Fetch/Decode, Decode/Execute, Execute/Memory, Memory/Write-back
// for each lane; the document has one set of four per lane). At the rising
// edge it loads d when en is high, or a bubble (all zero, a no-op) when en
// and clr are both high; with en low it holds, so a stall keeps its contents.
// reset (synchronous, active high) clears it. Enable and clear are this
// design's choices.
module pipe_reg #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic reset,
  input  logic en,
  input  logic clr,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (reset)    q <= '0;
    else if (en) begin
      if (clr)    q <= '0;
      else        q <= d;
    end
  end

endmodule
