// Five-to-one forwarding multiplexer of an Execute-stage operand.
//
// The superscalar pipeline has four of them, one per source operand of each
// lane. Besides the register-file value read in Decode, each picks the newest
// value of its register from the Memory or Write-back stage of either lane:
// ALUOutM1, ALUOutM2 (within lane and cross-lane Memory->Execute forwarding)
// and ResultW1, ResultW2 (Write-back->Execute). The five inputs follow the
// document; the select encoding (fwd_sel_t) is this design's. Combinational.
module fwd_mux
  import mips_ss_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  fwd_sel_t     sel,
  input  logic [W-1:0] rf,
  input  logic [W-1:0] m1,
  input  logic [W-1:0] m2,
  input  logic [W-1:0] w1,
  input  logic [W-1:0] w2,
  output logic [W-1:0] y
);

  always_comb begin
    unique case (sel)
      FWD_M1:  y = m1;
      FWD_M2:  y = m2;
      FWD_W1:  y = w1;
      FWD_W2:  y = w2;
      default: y = rf;
    endcase
  end

endmodule
