// Control unit of one lane: main decoder and ALU decoder.
//
// Decodes the 6-bit opcode and function code of the lane's instruction into
// the control word ctrl_t. The pipeline has two instances: unit 1 sees bits
// 63:58 / 37:32 of the fetched pair and decodes branch and jump; unit 2 sees
// bits 31:26 / 5:0 and is built with BRANCH_EN = 0, so its Branch and Jump
// outputs are always 0 (branches and jumps may only be the first instruction
// of a pair). This split follows the document. The instruction set (add, sub,
// and, or, slt, lw, sw, beq, addi, j) and the treatment of every other code
// as a no-op (no register or memory write) are this design's choices; the
// all-zero word, used as the pipeline bubble, is such a no-op. Combinational.
module control_unit
  import mips_ss_pkg::*;
#(
  parameter bit BRANCH_EN = 1'b1
) (
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '0;
    ctrl.alucontrol = ALU_ADD;
    unique case (op)
      OP_RTYPE: begin
        ctrl.regdst   = 1'b1;
        ctrl.regwrite = 1'b1;
        unique case (funct)
          FN_ADD:  ctrl.alucontrol = ALU_ADD;
          FN_SUB:  ctrl.alucontrol = ALU_SUB;
          FN_AND:  ctrl.alucontrol = ALU_AND;
          FN_OR:   ctrl.alucontrol = ALU_OR;
          FN_SLT:  ctrl.alucontrol = ALU_SLT;
          default: ctrl.regwrite   = 1'b0;  // unsupported: no-op
        endcase
      end
      OP_LW: begin
        ctrl.regwrite = 1'b1;
        ctrl.alusrc   = 1'b1;
        ctrl.memtoreg = 1'b1;
      end
      OP_SW: begin
        ctrl.alusrc   = 1'b1;
        ctrl.memwrite = 1'b1;
      end
      OP_ADDI: begin
        ctrl.regwrite = 1'b1;
        ctrl.alusrc   = 1'b1;
      end
      OP_BEQ: begin
        ctrl.branch     = BRANCH_EN;
        ctrl.alucontrol = ALU_SUB;
      end
      OP_J: begin
        ctrl.jump = BRANCH_EN;
      end
      default: ;  // unsupported: no-op
    endcase
  end

endmodule
