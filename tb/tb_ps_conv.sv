// tb_ps_conv: self-checking test of the parallel-to-serial converter.
// Loads random 32-bit words and checks that they leave most significant bit first, one
// bit per enabled clock, with random clocks of `en` low that must hold the output.
module tb_ps_conv;
  logic clk = 0, rst = 1, en = 0, load = 0, sout;
  logic [31:0] pin = '0, cur;
  int checks = 0, failures = 0;

  ps_conv #(.W(32)) dut (.clk, .rst, .en, .load, .pin, .sout);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    check(sout === 1'b0, "reset clears the output");
    repeat (40) begin
      cur = $urandom;
      en = 1; load = 1; pin = cur;
      @(negedge clk);
      load = 0; pin = $urandom;
      for (int b = 31; b >= 0; b--) begin
        check(sout === cur[b], $sformatf("bit %0d: got %0b exp %0b", b, sout, cur[b]));
        while ($urandom_range(0, 3) == 0) begin
          en = 0; load = $urandom_range(0, 1);
          @(negedge clk);
          check(sout === cur[b], "holds while en is low");
          load = 0;
        end
        en = 1;
        if (b > 0) @(negedge clk);
      end
    end
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
