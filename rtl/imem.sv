// Instruction memory that delivers an instruction pair.
//
// Word-addressed by PCF[31:2]; the read data is 64 bits wide and holds
// RAM[a] in bits 63:32 (the first instruction, for lane 1) and RAM[a+1] in
// bits 31:0 (the second, for lane 2). The pair may start at any word, so a
// branch target need not be pair-aligned. This follows the document. The
// depth (64 words, index wrapping at the end), the combinational read and
// the hex file that loads it at start-up are this design's choices. MEMFILE
// names a $readmemh file (one 32-bit word per line, word 0 first), by
// default a short demonstration program; with MEMFILE = "" the memory starts
// as all zero, which decodes as no-ops.
module imem #(
  parameter int unsigned WORDS   = 64,
  parameter string       MEMFILE = "rtl/mips_ss_demo.hex",
  localparam int unsigned AW     = $clog2(WORDS)
) (
  input  logic [31:0] a,
  output logic [63:0] rd
);

  logic [31:0] ram [WORDS];
  logic [AW-1:0] idx0, idx1;

  initial begin
    for (int i = 0; i < WORDS; i++) ram[i] = '0;
    if (MEMFILE != "") $readmemh(MEMFILE, ram);
  end

  assign idx0 = a[AW+1:2];
  assign idx1 = idx0 + 1'b1;
  assign rd   = {ram[idx0], ram[idx1]};

endmodule
