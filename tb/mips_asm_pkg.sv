// Testbench helpers for the superscalar MIPS pipeline: instruction encoders
// and a sequential instruction-set reference model.
//
// The reference model executes one instruction at a time in program order.
// A beq or j is followed by its delay-slot instruction (the next word, which
// in the pipeline is the second instruction of the same pair) before control
// moves to the target. Execution stops when a "j" to its own address is
// reached. Programs given to it must respect the pipeline's rules: branches
// and jumps only in the first slot of a pair, and no dependency between the
// two instructions of one pair.
package mips_asm_pkg;

  localparam logic [5:0] OP_R = 6'h00, OP_J = 6'h02, OP_BEQ = 6'h04,
                         OP_ADDI = 6'h08, OP_LW = 6'h23, OP_SW = 6'h2b;
  localparam logic [5:0] F_ADD = 6'h20, F_SUB = 6'h22, F_AND = 6'h24,
                         F_OR = 6'h25, F_SLT = 6'h2a;

  function automatic logic [31:0] enc_r(logic [5:0] fn, int rd, int rs, int rt);
    return {OP_R, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] enc_i(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] enc_j(int word_addr);
    return {OP_J, 26'(word_addr)};
  endfunction
  localparam logic [31:0] NOP = 32'h0;

  class isa_model;
    logic [31:0] regs [32];
    logic [31:0] mem  [];
    int          n_exec;

    function new(int dmem_words);
      mem = new[dmem_words];
      foreach (mem[i]) mem[i] = '0;
      foreach (regs[i]) regs[i] = '0;
      n_exec = 0;
    endfunction

    // executes one non-control instruction
    function void exec(logic [31:0] ins);
      logic [5:0] op = ins[31:26];
      int rs = ins[25:21], rt = ins[20:16], rd = ins[15:11];
      logic [31:0] simm = {{16{ins[15]}}, ins[15:0]};
      logic [31:0] a = regs[rs], b = regs[rt], y;
      int widx;
      n_exec++;
      widx = 0;
      case (op)
        OP_R: begin
          widx = rd;
          case (ins[5:0])
            F_ADD: y = a + b;
            F_SUB: y = a - b;
            F_AND: y = a & b;
            F_OR:  y = a | b;
            F_SLT: y = ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
            default: widx = 0;
          endcase
        end
        OP_ADDI: begin widx = rt; y = a + simm; end
        OP_LW:   begin widx = rt; y = mem[((a + simm) >> 2) % mem.size()]; end
        OP_SW:   mem[((a + simm) >> 2) % mem.size()] = b;
        default: ;
      endcase
      if (widx != 0) regs[widx] = y;
    endfunction

    // runs prog from word 0 until a jump to itself; returns false on runaway
    function bit run(logic [31:0] prog [], int max_steps);
      int pc = 0;  // word address
      for (int s = 0; s < max_steps; s++) begin
        logic [31:0] ins = prog[pc];
        if (ins[31:26] == OP_J) begin
          if (int'(ins[25:0]) == pc) return 1;
          exec(prog[pc + 1]);
          pc = int'(ins[25:0]);
        end else if (ins[31:26] == OP_BEQ) begin
          logic taken = (regs[ins[25:21]] == regs[ins[20:16]]);
          int tgt = pc + 1 + int'($signed(ins[15:0]));
          n_exec++;
          exec(prog[pc + 1]);
          pc = taken ? tgt : pc + 2;
        end else begin
          exec(ins);
          pc = pc + 1;
        end
      end
      return 0;
    endfunction
  endclass

endpackage
