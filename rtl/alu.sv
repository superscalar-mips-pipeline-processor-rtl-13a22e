// ALU of one lane of the superscalar MIPS pipeline (one per lane, two in all).
//
// Combinational: y = a OP b for the five operations of the supported
// instruction set (and, or, add, sub, set-less-than signed); zero flags a zero
// result. The operation set and the 3-bit control code follow the classic
// single-issue MIPS teaching pipeline that this design doubles; the document
// only names the two ALUs. An unknown code gives zero.
module alu
  import mips_ss_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_ctrl_t    ctrl,
  output logic [W-1:0] y,
  output logic         zero
);

  logic [W-1:0] diff;

  assign diff = a - b;

  always_comb begin
    unique case (ctrl)
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_ADD: y = a + b;
      ALU_SUB: y = diff;
      // signed compare: a < b when the signs differ and a is negative, or
      // when the signs agree and the difference is negative
      ALU_SLT: y = W'((a[W-1] != b[W-1]) ? a[W-1] : diff[W-1]);
      default: y = '0;
    endcase
  end

  assign zero = (y == '0);

endmodule
