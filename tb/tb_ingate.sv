// tb_ingate: self-checking test of the inlet gate.
// Fills the 16 lines with random opcodes and checks, for every select value over many
// rounds, that the gated word equals the selected line.
module tb_ingate;
  import switching_pkg::*;
  opcode_t    lines [16];
  logic [3:0] sel;
  opcode_t    word;
  int checks = 0, failures = 0;

  ingate #(.N(16)) dut (.lines, .sel, .word);

  initial begin
    repeat (20) begin
      foreach (lines[i]) lines[i] = opcode_t'($urandom);
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s);
        #1;
        checks++;
        if (word !== lines[s]) begin
          failures++;
          $display("FAIL sel=%0d word=%h exp=%h", s, word, lines[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
