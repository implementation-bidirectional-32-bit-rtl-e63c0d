// tb_sp_conv: self-checking test of the serial-to-parallel converter.
// Shifts random 32-bit words in, most significant bit first, with random idle clocks
// (shift low) in between, and checks that the holding register shows each finished word
// from the edge of its last bit until the next word completes.
module tb_sp_conv;
  logic clk = 0, rst = 1, shift = 0, last = 0, sin = 0;
  logic [31:0] word, expw, cur;
  int checks = 0, failures = 0;

  sp_conv #(.W(32)) dut (.clk, .rst, .shift, .last, .sin, .word);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0; expw = '0;
    check(word === '0, "reset clears the word");
    repeat (40) begin
      cur = $urandom;
      for (int b = 31; b >= 0; b--) begin
        while ($urandom_range(0, 3) == 0) begin    // idle clock: nothing may change
          shift = 0; sin = $urandom_range(0, 1); last = $urandom_range(0, 1);
          @(negedge clk);
          check(word === expw, "holds while shift is low");
        end
        shift = 1; sin = cur[b]; last = (b == 0);
        @(negedge clk);
        if (b == 0) expw = cur;
        check(word === expw, $sformatf("word %h exp %h after bit %0d", word, expw, b));
      end
    end
    shift = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
