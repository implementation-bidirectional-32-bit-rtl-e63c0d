// tb_switch_ctrl: self-checking test of the frame controller.
// The test bench plays the two slot counters (16 slots each) and checks: IDLE until
// enable, 16 scan clocks then 16 delivery clocks, frame_done once per 32-clock frame,
// and that a low enable freezes the phase and blocks both counter enables.
module tb_switch_ctrl;
  import switching_pkg::*;
  logic clk = 0, rst = 1, enable = 0;
  logic scan_last, dlv_last, scan_en, dlv_en, frame_done;
  phase_t phase;
  int unsigned in_cnt = 0, out_cnt = 0;
  int checks = 0, failures = 0;
  int scan_clocks = 0, dlv_clocks = 0, frames = 0, paused = 0;

  switch_ctrl dut (.clk, .rst, .enable, .scan_last, .dlv_last, .phase, .scan_en, .dlv_en,
                   .frame_done);

  assign scan_last = (in_cnt == 15);
  assign dlv_last  = (out_cnt == 15);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (scan_en) in_cnt <= (in_cnt + 1) % 16;
    if (dlv_en)  out_cnt <= (out_cnt + 1) % 16;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    check(phase === PH_IDLE && !scan_en && !dlv_en, "idle until enable");
    enable = 1;
    @(negedge clk);
    check(phase === PH_SCAN, "scan after enable");
    // Three frames back to back: exact phase sequence.
    for (int f = 0; f < 3; f++) begin
      for (int s = 0; s < 16; s++) begin
        check(phase === PH_SCAN && scan_en && !dlv_en, $sformatf("frame %0d scan slot %0d", f, s));
        check(in_cnt === s, "scan slot matches counter");
        scan_clocks++;
        @(negedge clk);
        if (s < 15) check(!frame_done, "no frame_done inside a scan");
      end
      for (int s = 0; s < 16; s++) begin
        check(phase === PH_DELIVER && dlv_en && !scan_en, $sformatf("frame %0d deliver slot %0d", f, s));
        dlv_clocks++;
        @(negedge clk);
        check(frame_done === (s === 15), "frame_done only after the last delivery slot");
      end
      frames++;
    end
    // Enable low in the middle of a scan: everything holds.
    repeat (5) @(negedge clk);
    begin
      phase_t ph; int unsigned c;
      ph = phase; c = in_cnt;
      enable = 0;
      repeat (7) begin
        @(negedge clk);
        check(phase === ph && in_cnt === c && !scan_en && !dlv_en, "frozen while enable is low");
        paused++;
      end
      enable = 1;
      @(negedge clk);
      check(in_cnt === (c + 1) % 16, "resumes after enable returns");
    end
    // Reset returns to IDLE.
    rst = 1; @(negedge clk); rst = 0;
    check(phase === PH_IDLE, "reset to idle");
    check(scan_clocks === 48 && dlv_clocks === 48 && frames === 3 && paused === 7, "activity counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
