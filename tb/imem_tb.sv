// Self-checking test of the pair-fetching instruction memory: after filling
// it with distinct words, every aligned and odd word address must return
// {RAM[a], RAM[a+1]}, wrapping at the last word.
module imem_tb;
  localparam int WORDS = 64;
  logic [31:0] a;
  logic [63:0] rd;
  int checks = 0, failures = 0;

  imem #(.WORDS(WORDS)) dut (.a, .rd);

  function automatic logic [31:0] word_val(int i);
    return 32'h1000_0000 + 32'(i) * 32'h0001_0101;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;  // after the memory's own start-up load
    for (int i = 0; i < WORDS; i++) dut.ram[i] = word_val(i);
    for (int i = 0; i < WORDS; i++) begin
      a = 32'(i * 4); #1;
      checks++;
      if (rd !== {word_val(i), word_val((i + 1) % WORDS)}) begin
        failures++; $display("FAIL a=%h rd=%h", a, rd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
