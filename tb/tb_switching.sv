// tb_switching: end-to-end self-checking test of the two-exchange switch, at its default
// size (2 exchanges x 16 subscribers, 16-clock scan and 16-clock delivery phases).
//
// Reference model: for a set of line words held for one frame, it walks the inlets in scan
// order (slot 0..15, first exchange before second within a slot), connects each enabled
// caller whose called subscriber is idle and whose called outlet is still free, and derives
// the word and caller number every outlet must show after the delivery phase.
// Scenarios:
//   1. inter-exchange call, first exchange inlet 0: enable=1, inter=1, caller 5, called 6,
//      payload AD01 (32'hD940AD01); outlet 6 of the second exchange must show 32'hD400AD01,
//      on the clock edge 2+16+6 after enable, and caller ID 5;
//   2. intra-exchange call in the first exchange: caller 6, called 5, payload AD01;
//   3. called subscriber enabled -> refused; 4. two callers to one outlet -> busy refusal
//      (in different slots and in the same slot); 5. idle caller -> nothing;
//   6. enable held low inside a frame -> nothing moves, frame completes afterwards;
//   7. random frames compared in full.
// Every mechanism (intra, inter, called-enabled refusal, busy refusal, enable pause) is
// counted and must occur at least once.
module tb_switching;
  import switching_pkg::*;

  logic            clk = 0, rst = 1, enable = 0;
  opcode_t         line_in   [N_EXCH][N_USERS];
  opcode_t         line_out  [N_EXCH][N_USERS];
  logic [ID_W-1:0] caller_id [N_EXCH][N_USERS];
  phase_t          phase;
  logic            frame_done;
  logic            call_setup [N_EXCH], call_blocked [N_EXCH];

  switching dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_intra = 0, n_inter = 0, n_refused_enabled = 0, n_refused_busy = 0, n_pause = 0;
  int setups_seen = 0, blocks_seen = 0;

  // Expected results of one frame.
  opcode_t         exp_out [N_EXCH][N_USERS];
  logic [ID_W-1:0] exp_cid [N_EXCH][N_USERS];
  int              exp_setups, exp_blocks;

  always @(posedge clk) begin
    for (int e = 0; e < N_EXCH; e++) begin
      if (call_setup[e])   setups_seen++;
      if (call_blocked[e]) blocks_seen++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic opcode_t op(input bit en, input bit inter, input int dst, input int src,
                                 input logic [15:0] data);
    opcode_t w;
    w = '0; w.en = en; w.inter = inter; w.dst = 4'(dst); w.src = 4'(src); w.data = data;
    return w;
  endfunction

  task automatic clear_lines();
    foreach (line_in[e, u]) line_in[e][u] = '0;
  endtask

  // Reference model of one frame.
  task automatic model_frame();
    bit         used [N_EXCH][N_USERS];
    int         from_ex [N_EXCH][N_USERS];
    int         from_loc [N_EXCH][N_USERS];
    exp_setups = 0; exp_blocks = 0;
    foreach (used[x, j]) used[x][j] = 0;
    for (int i = 0; i < N_USERS; i++) begin
      for (int e = 0; e < N_EXCH; e++) begin
        opcode_t w; int de;
        w = line_in[e][i];
        if (!w.en) continue;
        de = w.inter ? 1 - e : e;
        if (line_in[de][w.dst].en) begin
          exp_blocks++; n_refused_enabled++;
        end else if (used[de][w.dst]) begin
          exp_blocks++; n_refused_busy++;
        end else begin
          used[de][w.dst] = 1; from_ex[de][w.dst] = e; from_loc[de][w.dst] = i;
          exp_setups++;
          if (de == e) n_intra++; else n_inter++;
        end
      end
    end
    foreach (exp_out[x, j]) begin
      if (used[x][j]) begin
        opcode_t s;
        s = line_in[from_ex[x][j]][from_loc[x][j]];
        exp_out[x][j] = make_delivered(from_ex[x][j] != x, s.src, s.data);
        exp_cid[x][j] = s.src;
      end else begin
        exp_out[x][j] = '0;
        exp_cid[x][j] = '0;
      end
    end
  endtask

  task automatic compare_frame(input string tag);
    foreach (exp_out[x, j]) begin
      check(line_out[x][j] === exp_out[x][j],
            $sformatf("%s: exchange %0d outlet %0d got %h exp %h", tag, x, j, line_out[x][j], exp_out[x][j]));
      check(caller_id[x][j] === exp_cid[x][j],
            $sformatf("%s: exchange %0d caller id %0d got %0d exp %0d", tag, x, j, caller_id[x][j], exp_cid[x][j]));
    end
  endtask

  // Run one frame from the start of a scan phase, with the current line words, and compare.
  task automatic run_frame(input string tag);
    int s0, b0, n;
    model_frame();
    s0 = setups_seen; b0 = blocks_seen; n = 0;
    do begin @(negedge clk); n++; end while (!frame_done);
    check(n === 2 * N_USERS, $sformatf("%s: frame took %0d clocks, exp %0d", tag, n, 2 * N_USERS));
    check(setups_seen - s0 === exp_setups, $sformatf("%s: %0d call setups, exp %0d", tag, setups_seen - s0, exp_setups));
    check(blocks_seen - b0 === exp_blocks, $sformatf("%s: %0d refusals, exp %0d", tag, blocks_seen - b0, exp_blocks));
    compare_frame(tag);
  endtask

  initial begin
    int edges;
    clear_lines();
    // Scenario 1: the published inter-exchange example.
    line_in[0][0] = 32'hD940AD01;
    check(line_in[0][0] === op(1, 1, 6, 5, 16'hAD01), "opcode field layout");
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    enable = 1;
    // Latency: outlet 6 of the second exchange changes on edge 2+16+6 after enable.
    edges = 0;
    do begin @(negedge clk); edges++; end while (line_out[1][6] == '0 && edges < 100);
    check(edges === 2 + N_USERS + 6, $sformatf("inter call delivered on edge %0d, exp %0d", edges, 2 + N_USERS + 6));
    check(line_out[1][6] === 32'hD400AD01, $sformatf("inter call word %h, exp D400AD01", line_out[1][6]));
    check(caller_id[1][6] === 4'd5, "inter call caller id 5");
    while (!frame_done) @(negedge clk);
    model_frame();          // same lines: frame 1 result equals the model
    compare_frame("fig inter");
    // From here each frame starts right after frame_done.
    run_frame("inter repeat");

    // Scenario 2: intra-exchange call in the first exchange, caller 6 -> called 5.
    clear_lines();
    line_in[0][0] = op(1, 0, 5, 6, 16'hAD01);
    run_frame("intra");
    check(line_out[0][5] === 32'h9800AD01, $sformatf("intra word %h, exp 9800AD01", line_out[0][5]));
    check(line_out[1][5] === '0, "intra call does not reach the other exchange");

    // Second-exchange callers in both directions.
    clear_lines();
    line_in[1][3]  = op(1, 1, 12, 9, 16'h1234);
    line_in[1][10] = op(1, 0, 2, 10, 16'hBEEF);
    run_frame("second exchange");

    // Scenario 3: the called subscriber is enabled -> refused.
    clear_lines();
    line_in[0][1] = op(1, 1, 4, 1, 16'h5555);
    line_in[1][4] = op(1, 0, 7, 4, 16'h6666);   // called line is enabled (and calls 7)
    run_frame("called enabled");
    check(line_out[1][4] === '0, "refused call not delivered");

    // Scenario 4: two callers to one outlet, in different slots and in the same slot.
    clear_lines();
    line_in[0][2] = op(1, 0, 9, 2, 16'h0A0A);
    line_in[0][8] = op(1, 0, 9, 8, 16'h0B0B);    // later slot, same outlet: busy
    line_in[0][5] = op(1, 1, 11, 5, 16'h0C0C);
    line_in[1][5] = op(1, 0, 11, 6, 16'h0D0D);   // same slot, same outlet: first exchange wins
    run_frame("busy");
    check(line_out[0][9].data === 16'h0A0A, "first caller keeps the outlet");
    check(line_out[1][11].data === 16'h0C0C, "same-slot tie goes to the first exchange");

    // Scenario 5: idle caller.
    clear_lines();
    line_in[0][7] = op(0, 1, 3, 7, 16'hFFFF);
    run_frame("idle caller");

    // Scenario 6: enable low for 10 clocks inside a frame.
    clear_lines();
    line_in[0][4] = op(1, 1, 15, 4, 16'h4444);
    line_in[1][0] = op(1, 0, 0, 1, 16'h0101);
    model_frame();
    begin
      int n; opcode_t hold [N_EXCH][N_USERS];
      n = 0;
      repeat (20) @(negedge clk);
      enable = 0;
      hold = line_out;
      repeat (10) begin
        @(negedge clk);
        check(line_out === hold && !frame_done, "nothing moves while enable is low");
        n_pause++;
      end
      enable = 1;
      while (!frame_done) begin @(negedge clk); n++; end
      check(n === 2 * N_USERS - 20, $sformatf("paused frame resumed for %0d clocks", n));
      compare_frame("enable pause");
    end

    // Scenario 7: random frames.
    for (int f = 0; f < 40; f++) begin
      foreach (line_in[e, u])
        line_in[e][u] = op($urandom_range(0, 9) < 4, $urandom_range(0, 1), $urandom_range(0, 15),
                           $urandom_range(0, 15), 16'($urandom));
      run_frame($sformatf("random %0d", f));
    end

    $display("mechanisms: intra=%0d inter=%0d refused_enabled=%0d refused_busy=%0d pause=%0d",
             n_intra, n_inter, n_refused_enabled, n_refused_busy, n_pause);
    check(n_intra > 0, "intra-exchange call happened");
    check(n_inter > 0, "inter-exchange call happened");
    check(n_refused_enabled > 0, "called-enabled refusal happened");
    check(n_refused_busy > 0, "busy refusal happened");
    check(n_pause > 0, "enable pause happened");
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
