// Branch logic of lane 1, in the Decode stage.
//
// An equality comparator on the two (forwarded) register operands is ANDed
// with BranchD1 to give PCSrcD1, which steers the next-PC multiplexer to
// PCBranchD. The target is the instruction's 16-bit immediate, sign-extended
// to 32 bits, shifted left by 2 and added to PC+4, where PC is the address of
// the branch. The next PC of the pair-fetching pipeline defaults to PC+8, but
// the branch offset stays relative to PC+4 as MIPS defines it. All of this
// follows the document; only lane 1 has this unit. Combinational.
module branch_unit (
  input  logic [15:0] imm,
  input  logic [31:0] pcplus4,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        branch,
  output logic        pcsrc,
  output logic [31:0] pcbranch
);

  logic [31:0] signimm;

  assign signimm  = {{16{imm[15]}}, imm};
  assign pcbranch = {signimm[29:0], 2'b00} + pcplus4;
  assign pcsrc    = branch & (a == b);

endmodule
