// tb_mod_counter: self-checking test of the modulo-N slot counter.
// Runs a modulo-16 and a modulo-5 counter with random enable and clear, compares count
// and the last-slot flag with a reference count every clock, and checks that a full
// scan of 16 enabled clocks returns the counter to 0.
module tb_mod_counter;
  logic clk = 0, rst = 1, clr = 0, en = 0;
  logic [3:0] cnt16; logic last16;
  logic [2:0] cnt5;  logic last5;
  int checks = 0, failures = 0;
  int unsigned ref16, ref5;

  mod_counter #(.N(16)) dut16 (.clk, .rst, .clr, .en, .count(cnt16), .last(last16));
  mod_counter #(.N(5))  dut5  (.clk, .rst, .clr, .en, .count(cnt5),  .last(last5));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0; ref16 = 0; ref5 = 0;
    // A plain scan of 16 slots.
    en <= 1;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      check(cnt16 === 4'(i), $sformatf("scan slot %0d got %0d", i, cnt16));
      check(last16 === (i === 15), "last flag during scan");
    end
    @(negedge clk);
    check(cnt16 === 0, "wrap to 0 after 16 slots");
    en <= 0; clr <= 1; @(negedge clk); clr <= 0;
    ref16 = 0; ref5 = 0;
    // Random enable and clear against a reference.
    repeat (400) begin
      en  <= $urandom_range(0, 3) != 0;
      clr <= $urandom_range(0, 19) == 0;
      @(posedge clk);
      if (clr) begin ref16 = 0; ref5 = 0; end
      else if (en) begin ref16 = (ref16 + 1) % 16; ref5 = (ref5 + 1) % 5; end
      @(negedge clk);
      check(cnt16 === 4'(ref16), $sformatf("mod16 count %0d exp %0d", cnt16, ref16));
      check(cnt5  === 3'(ref5),  $sformatf("mod5 count %0d exp %0d", cnt5, ref5));
      check(last5 === (ref5 === 4), "mod5 last flag");
    end
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
