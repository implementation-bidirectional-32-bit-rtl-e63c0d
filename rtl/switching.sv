// switching: bidirectional two-exchange time-division switch, 2 x 16 subscribers.
//
// Each of the 32 subscriber lines presents a 32-bit opcode (see switching_pkg): enable,
// inter/intra bit, called number, caller number and a 16-bit payload. A frame has two
// phases of N clocks each, run by switch_ctrl:
//   Phase 1, scan (sequential write). The ingate counter selects inlet i of both
//     exchanges in the same clock. Its payload goes to data-memory location i, its caller
//     number to caller-ID location i. If the caller is enabled and the called subscriber
//     (line `dst` of the same exchange when inter=0, of the other exchange when inter=1)
//     is not, the called exchange's control memory records, at the called outlet, the
//     caller's exchange and location.
//   Phase 2, deliver (random read). The outgate counter selects outlet j of both
//     exchanges. Its control-memory entry addresses the data and caller-ID memories of the
//     calling exchange; the outlet receives {en=1, inter, caller number in bits 29:26,
//     zeros in 25:22, payload}, or all zeros when nobody calls it. The destination half of
//     the caller-ID memory keeps the caller number, shown on `caller_id`.
// Interface: line_in[e][u]/line_out[e][u] are subscriber u of exchange e (0 = first,
// 1 = second). Outlet j is updated on the edge that ends delivery slot j, i.e. 2 + N + j
// clocks after the first enabled clock following reset, and then every 2*N clocks.
// Synchronous, active-high reset; nothing moves while `enable` is low.
// `call_setup[e]` pulses when an inlet of exchange e gets a connection, `call_blocked[e]`
// when an enabled inlet of exchange e is refused (called subscriber enabled, or called
// outlet already taken this frame).
// The opcode layout, the two phases, the memories and the two exchanges follow the
// published design; the separate input and output ports per line, the outlet word format
// beyond what the published simulation shows, and the refusal rules are this design's.
module switching
  import switching_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            enable,
  input  opcode_t         line_in   [N_EXCH][N_USERS],
  output opcode_t         line_out  [N_EXCH][N_USERS],
  output logic [ID_W-1:0] caller_id [N_EXCH][N_USERS],
  output phase_t          phase,
  output logic            frame_done,
  output logic            call_setup   [N_EXCH],
  output logic            call_blocked [N_EXCH]
);

  localparam int unsigned AW = $clog2(N_USERS);

  logic          scan_en, dlv_en, scan_last, dlv_last;
  logic [AW-1:0] in_cnt, out_cnt;

  switch_ctrl u_ctrl (
    .clk, .rst, .enable, .scan_last, .dlv_last,
    .phase, .scan_en, .dlv_en, .frame_done
  );

  // Modular counter of the ingate side (scan) and of the outgate side (delivery).
  mod_counter #(.N(N_USERS)) u_in_cnt (
    .clk, .rst, .clr(1'b0), .en(scan_en), .count(in_cnt), .last(scan_last)
  );
  mod_counter #(.N(N_USERS)) u_out_cnt (
    .clk, .rst, .clr(1'b0), .en(dlv_en), .count(out_cnt), .last(dlv_last)
  );

  // Per-exchange signals; index e is the exchange that owns the block.
  opcode_t         scan_word  [N_EXCH];
  logic            dest_ex    [N_EXCH];   // exchange the scanned caller wants
  logic            called_en  [N_EXCH];   // called subscriber is itself enabled
  logic            req        [N_EXCH];   // scanned inlet asks for a connection
  logic            cm_wr_en   [N_EXCH][N_EXCH];  // [called exchange][port = calling exchange]
  logic [AW-1:0]   cm_wr_addr [N_EXCH][N_EXCH];
  cm_entry_t       cm_wr_data [N_EXCH][N_EXCH];
  logic            cm_wr_ok   [N_EXCH][N_EXCH];
  cm_entry_t       cm_rd      [N_EXCH];
  logic [AW-1:0]   dm_raddr   [N_EXCH][N_EXCH];  // [memory's exchange][reading outlet side]
  dm_word_t        dm_rdata   [N_EXCH][N_EXCH];
  logic [ID_W-1:0] cid_rid    [N_EXCH][N_EXCH];
  dm_word_t        dlv_dm     [N_EXCH];
  logic [ID_W-1:0] dlv_cid    [N_EXCH];
  logic            dlv_hit    [N_EXCH];
  opcode_t         dlv_word   [N_EXCH];

  for (genvar e = 0; e < N_EXCH; e++) begin : g_ex

    ingate #(.N(N_USERS)) u_ingate (
      .lines(line_in[e]), .sel(in_cnt), .word(scan_word[e])
    );

    // Call request of the scanned inlet of exchange e.
    assign dest_ex[e]   = scan_word[e].inter ? 1'b1 - 1'(e) : 1'(e);
    assign called_en[e] = line_in[dest_ex[e]][scan_word[e].dst].en;
    assign req[e]       = scan_en && scan_word[e].en && !called_en[e];

    data_memory #(.N(N_USERS), .N_RD(N_EXCH)) u_dm (
      .clk, .rst,
      .we(scan_en), .waddr(in_cnt),
      .wdata('{en: scan_word[e].en, data: scan_word[e].data}),
      .raddr(dm_raddr[e]), .rdata(dm_rdata[e])
    );

    // Control memory of exchange e; write port p carries calls from exchange p.
    for (genvar p = 0; p < N_EXCH; p++) begin : g_port
      assign cm_wr_en[e][p]   = req[p] && (dest_ex[p] == 1'(e));
      assign cm_wr_addr[e][p] = scan_word[p].dst;
      assign cm_wr_data[e][p] = '{valid: 1'b1, src_ex: 1'(p), src_loc: in_cnt};
      // Outlet side e reads location cm_rd[e].src_loc of exchange p's memories.
      assign dm_raddr[p][e]   = cm_rd[e].src_loc;
    end

    control_memory #(.N(N_USERS), .N_WR(N_EXCH)) u_cm (
      .clk, .rst,
      .wr_en(cm_wr_en[e]), .wr_addr(cm_wr_addr[e]), .wr_data(cm_wr_data[e]),
      .wr_ok(cm_wr_ok[e]),
      .rd_addr(out_cnt), .rd_clr(dlv_en), .rd_data(cm_rd[e])
    );

    // Delivery to outlet out_cnt of exchange e.
    assign dlv_dm[e]  = dm_rdata[cm_rd[e].src_ex][e];
    assign dlv_cid[e] = cid_rid[cm_rd[e].src_ex][e];
    assign dlv_hit[e] = cm_rd[e].valid && dlv_dm[e].en;
    assign dlv_word[e] = dlv_hit[e]
                       ? make_delivered(cm_rd[e].src_ex != 1'(e), dlv_cid[e], dlv_dm[e].data)
                       : '0;

    callerid_memory #(.N(N_USERS), .N_RD(N_EXCH)) u_cid (
      .clk, .rst,
      .src_we(scan_en), .src_addr(in_cnt), .src_id(scan_word[e].src),
      .src_raddr(dm_raddr[e]), .src_rid(cid_rid[e]),
      .dst_we(dlv_en), .dst_addr(out_cnt), .dst_id(dlv_hit[e] ? dlv_cid[e] : '0),
      .dst_ids(caller_id[e])
    );

    outgate #(.N(N_USERS)) u_outgate (
      .clk, .rst, .we(dlv_en), .sel(out_cnt), .word(dlv_word[e]), .lines(line_out[e])
    );

    // A request is connected if the called exchange's control memory takes it.
    assign call_setup[e]   = req[e] && cm_wr_ok[dest_ex[e]][e];
    assign call_blocked[e] = scan_en && scan_word[e].en && !call_setup[e];

  end

endmodule
