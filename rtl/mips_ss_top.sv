// Top of the two-way superscalar MIPS pipeline processor.
//
// Joins the pipeline core with its instruction memory, which hands it two
// consecutive instructions per cycle as one 64-bit word, and the data memory,
// which has one port per lane. The write-back value and destination register
// of each lane (ResultW1/WriteRegW1, ResultW2/WriteRegW2) are the outputs; on
// an FPGA board they drive LEDs, lane 1 on one bank and lane 2 on another.
// The program is read into the instruction memory at start-up from the hex
// file named by IMEM_FILE (path relative to the directory the simulator or
// synthesis tool runs in); the default is a short demonstration program. Reset is
// synchronous and active high; execution starts at address 0.
// The structure follows the document; memory sizes are this design's choice.
module mips_ss_top #(
  parameter int unsigned IMEM_WORDS = 64,
  parameter int unsigned DMEM_WORDS = 64,
  parameter string       IMEM_FILE  = "rtl/mips_ss_demo.hex"
) (
  input  logic        clk,
  input  logic        reset,
  output logic [31:0] result_w1,
  output logic [31:0] result_w2,
  output logic [4:0]  writereg_w1,
  output logic [4:0]  writereg_w2,
  output logic        regwrite_w1,
  output logic        regwrite_w2
);

  logic [31:0] pcf;
  logic [63:0] instr_f;
  logic        memwrite_m1, memwrite_m2;
  logic [31:0] aluout_m1, writedata_m1, readdata_m1;
  logic [31:0] aluout_m2, writedata_m2, readdata_m2;

  imem #(.WORDS(IMEM_WORDS), .MEMFILE(IMEM_FILE)) u_imem (.a(pcf), .rd(instr_f));

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk,
    .we1(memwrite_m1), .a1(aluout_m1), .wd1(writedata_m1), .rd1(readdata_m1),
    .we2(memwrite_m2), .a2(aluout_m2), .wd2(writedata_m2), .rd2(readdata_m2)
  );

  mips_ss_core u_core (
    .clk, .reset,
    .pcf, .instr_f,
    .memwrite_m1, .aluout_m1, .writedata_m1, .readdata_m1,
    .memwrite_m2, .aluout_m2, .writedata_m2, .readdata_m2,
    .result_w1, .result_w2, .writereg_w1, .writereg_w2, .regwrite_w1, .regwrite_w2
  );

endmodule
