// tb_outgate: self-checking test of the outlet gate.
// Writes random words to random outlets and checks all 16 held outlet words every clock
// against a reference; outlets not written must keep their word, reset must clear all.
module tb_outgate;
  import switching_pkg::*;
  logic clk = 0, rst = 1, we = 0;
  logic [3:0] sel = 0;
  opcode_t word = '0;
  opcode_t lines [16], model [16];
  int checks = 0, failures = 0;

  outgate #(.N(16)) dut (.clk, .rst, .we, .sel, .word, .lines);

  always #5 clk = ~clk;

  task automatic compare();
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (lines[i] !== model[i]) begin
        failures++;
        $display("FAIL outlet %0d got %h exp %h", i, lines[i], model[i]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0; foreach (model[i]) model[i] = '0;
    @(negedge clk); compare();
    repeat (300) begin
      we = $urandom_range(0, 1); sel = 4'($urandom); word = opcode_t'($urandom);
      @(posedge clk); if (we) model[sel] = word;
      @(negedge clk); compare();
    end
    we = 0; rst = 1; @(posedge clk); @(negedge clk); rst = 0;
    foreach (model[i]) model[i] = '0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
