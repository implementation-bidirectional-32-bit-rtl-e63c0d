// tb_switching_system: end-to-end self-checking test of the switch with serial lines, at
// its default size (2 exchanges x 16 subscribers, 32-bit words, 32-clock frames).
//
// The test bench sends one 32-bit word per line per frame on rx, most significant bit
// first, starting at the clock where rx_sync is high, and collects one word per line per
// frame from tx, starting at the clock where tx_sync is high. A reference model of the
// switching rules (see tb_switching) gives the word every outlet must send; the words sent
// in frame k must come back on tx starting in frame k+2.
// Frames: the published inter-exchange example (32'hD940AD01 on first-exchange line 0 must
// reach second-exchange line 6 as 32'hD400AD01), the published intra-exchange example,
// refused calls (called subscriber active, outlet busy), then random frames; enable is
// dropped for a few clocks in the middle of one frame. Each mechanism is counted and must
// occur at least once.
module tb_switching_system;
  import switching_pkg::*;

  localparam int FRAMES = 16;     // frames of input words
  localparam int FR     = 2 * N_USERS;

  logic            clk = 0, rst = 1, enable = 0;
  logic            rx [N_EXCH][N_USERS];
  logic            tx [N_EXCH][N_USERS];
  logic            rx_sync, tx_sync;
  logic [ID_W-1:0] caller_id [N_EXCH][N_USERS];
  phase_t          phase;
  logic            frame_done;
  logic            call_setup [N_EXCH], call_blocked [N_EXCH];

  switching_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_intra = 0, n_inter = 0, n_refused_enabled = 0, n_refused_busy = 0, n_pause = 0;
  int n_words = 0;

  opcode_t words   [FRAMES + 3][N_EXCH][N_USERS];   // sent per frame (zeros at the end)
  opcode_t expect_ [FRAMES + 3][N_EXCH][N_USERS];   // model result of the words of a frame
  opcode_t got     [FRAMES + 3][N_EXCH][N_USERS];   // collected from tx, by source frame

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

  // Reference model: the words delivered for one frame of line words.
  task automatic model(input int f);
    bit used [N_EXCH][N_USERS];
    int from_ex [N_EXCH][N_USERS], from_loc [N_EXCH][N_USERS];
    foreach (used[x, j]) used[x][j] = 0;
    for (int i = 0; i < N_USERS; i++)
      for (int e = 0; e < N_EXCH; e++) begin
        opcode_t w; int de;
        w = words[f][e][i];
        if (!w.en) continue;
        de = w.inter ? 1 - e : e;
        if (words[f][de][w.dst].en) n_refused_enabled++;
        else if (used[de][w.dst]) n_refused_busy++;
        else begin
          used[de][w.dst] = 1; from_ex[de][w.dst] = e; from_loc[de][w.dst] = i;
          if (de == e) n_intra++; else n_inter++;
        end
      end
    foreach (used[x, j])
      expect_[f][x][j] = used[x][j]
        ? make_delivered(from_ex[x][j] != x, words[f][from_ex[x][j]][from_loc[x][j]].src,
                         words[f][from_ex[x][j]][from_loc[x][j]].data)
        : '0;
  endtask

  initial begin
    foreach (words[f, e, u]) words[f][e][u] = '0;
    foreach (rx[e, u]) rx[e][u] = 0;
    // Frame 0: published inter-exchange example. Frame 1: published intra example.
    words[0][0][0] = 32'hD940AD01;
    words[1][0][0] = op(1, 0, 5, 6, 16'hAD01);
    // Frame 2: refused calls and second-exchange callers.
    words[2][0][1] = op(1, 1, 4, 1, 16'h5555);   // called line 4 of exchange 2 is active
    words[2][1][4] = op(1, 0, 7, 4, 16'h6666);
    words[2][0][2] = op(1, 0, 9, 2, 16'h0A0A);
    words[2][0][8] = op(1, 0, 9, 8, 16'h0B0B);   // busy: outlet 9 already taken
    // Random frames.
    foreach (words[f, e, u])
      if (f >= 3 && f < FRAMES)
        words[f][e][u] = op($urandom_range(0, 9) < 4, $urandom_range(0, 1), $urandom_range(0, 15),
                            $urandom_range(0, 15), 16'($urandom));
    for (int f = 0; f < FRAMES + 3; f++) model(f);

    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    enable = 1;
    @(negedge clk);     // controller has left IDLE: enabled clock 0 of frame 0 follows
    // Enabled clocks t = FR*f + p.
    for (int t = 0; t < (FRAMES + 3) * FR; t++) begin
      int f, p;
      f = t / FR; p = t % FR;
      // Pause for 6 clocks in the middle of frame 5.
      if (t == 5 * FR + 11) begin
        logic hold_tx [N_EXCH][N_USERS];
        hold_tx = tx;
        enable = 0;
        repeat (6) begin
          @(negedge clk);
          check(tx == hold_tx && !rx_sync && !tx_sync, "serial lines hold while enable is low");
          n_pause++;
        end
        enable = 1;
      end
      foreach (rx[e, u]) rx[e][u] = words[f][e][u][FR - 1 - p];
      check(rx_sync === (p == 0), $sformatf("rx_sync at position %0d", p));
      check(tx_sync === (p == 1), $sformatf("tx_sync at position %0d", p));
      // tx carries bit 31-(p-1) of the word of source frame f-2 (p >= 1), or bit 0 of the
      // word of source frame f-3 (p == 0).
      foreach (tx[e, u]) begin
        if (p >= 1 && f >= 2)      got[f - 2][e][u][FR - p] = tx[e][u];
        else if (p == 0 && f >= 3) got[f - 3][e][u][0]     = tx[e][u];
      end
      @(negedge clk);
    end
    foreach (got[f, e, u])
      if (f < FRAMES) begin
        check(got[f][e][u] === expect_[f][e][u],
              $sformatf("frame %0d exchange %0d line %0d: tx word %h exp %h", f, e, u, got[f][e][u], expect_[f][e][u]));
        n_words++;
      end
    check(got[0][1][6] === 32'hD400AD01, "published inter example arrives as D400AD01");
    check(got[1][0][5] === 32'h9800AD01, "published intra example arrives on line 5");
    $display("mechanisms: words=%0d intra=%0d inter=%0d refused_enabled=%0d refused_busy=%0d pause=%0d",
             n_words, n_intra, n_inter, n_refused_enabled, n_refused_busy, n_pause);
    check(n_intra > 0, "intra-exchange call happened");
    check(n_inter > 0, "inter-exchange call happened");
    check(n_refused_enabled > 0, "called-enabled refusal happened");
    check(n_refused_busy > 0, "busy refusal happened");
    check(n_pause > 0, "enable pause happened");
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
