// Self-checking test of the control unit in both configurations: unit 1
// (branch and jump decoded) and unit 2 (never branches). Every supported
// opcode/function is compared with a hand-written control table; other codes
// must produce no register or memory write.
module control_unit_tb;
  import mips_ss_pkg::*;
  logic [5:0] op, funct;
  ctrl_t c1, c2;
  int checks = 0, failures = 0;

  control_unit #(.BRANCH_EN(1'b1)) dut1 (.op, .funct, .ctrl(c1));
  control_unit #(.BRANCH_EN(1'b0)) dut2 (.op, .funct, .ctrl(c2));

  // expected {regwrite, memtoreg, memwrite, alusrc, regdst, branch, jump}, alu
  task automatic expect_ctrl(string nm, logic [5:0] o, logic [5:0] f,
                             logic [6:0] bits1, alu_ctrl_t alu, logic check_alu);
    logic [6:0] got1, got2, bits2;
    op = o; funct = f; #1;
    got1 = {c1.regwrite, c1.memtoreg, c1.memwrite, c1.alusrc, c1.regdst, c1.branch, c1.jump};
    got2 = {c2.regwrite, c2.memtoreg, c2.memwrite, c2.alusrc, c2.regdst, c2.branch, c2.jump};
    bits2 = {bits1[6:2], 2'b00};
    checks += 2;
    if (got1 !== bits1 || (check_alu && c1.alucontrol !== alu)) begin
      failures++; $display("FAIL unit1 %s got %b alu %b", nm, got1, c1.alucontrol);
    end
    if (got2 !== bits2 || (check_alu && c2.alucontrol !== alu)) begin
      failures++; $display("FAIL unit2 %s got %b alu %b", nm, got2, c2.alucontrol);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_ctrl("add",  6'h00, 6'h20, 7'b1000100, ALU_ADD, 1);
    expect_ctrl("sub",  6'h00, 6'h22, 7'b1000100, ALU_SUB, 1);
    expect_ctrl("and",  6'h00, 6'h24, 7'b1000100, ALU_AND, 1);
    expect_ctrl("or",   6'h00, 6'h25, 7'b1000100, ALU_OR,  1);
    expect_ctrl("slt",  6'h00, 6'h2a, 7'b1000100, ALU_SLT, 1);
    expect_ctrl("lw",   6'h23, 6'h15, 7'b1101000, ALU_ADD, 1);
    expect_ctrl("sw",   6'h2b, 6'h3f, 7'b0011000, ALU_ADD, 1);
    expect_ctrl("addi", 6'h08, 6'h00, 7'b1001000, ALU_ADD, 1);
    expect_ctrl("beq",  6'h04, 6'h00, 7'b0000010, ALU_SUB, 0);
    expect_ctrl("j",    6'h02, 6'h00, 7'b0000001, ALU_ADD, 0);
    expect_ctrl("nop",  6'h00, 6'h00, 7'b0000100, ALU_ADD, 0);
    // unsupported codes: nothing written
    for (int o = 0; o < 64; o++) begin
      if (o inside {'h00, 'h02, 'h04, 'h08, 'h23, 'h2b}) continue;
      op = 6'(o); funct = 6'($urandom); #1;
      checks++;
      if (c1.regwrite || c1.memwrite || c1.branch || c1.jump || c2.regwrite || c2.memwrite) begin
        failures++; $display("FAIL unsupported op %h decoded as active", o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
