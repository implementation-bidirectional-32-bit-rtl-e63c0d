// control_memory: per-exchange control memory, one location per outlet.
//
// Location j holds the address of the inlet connected to outlet j of this exchange:
// {valid, source exchange, source location}. It is filled during the scan phase from the
// destination field of each calling opcode and read back during the delivery phase, when
// the outgate counter walks the outlets in order and each entry selects the data-memory
// location to read (random read).
// Two write ports, one per source exchange, because both exchanges are scanned in the same
// clock and both may call into this exchange. A write is taken only if the outlet is free
// (busy outlets reject later callers); when both ports address the same free outlet in the
// same clock, port 0 (the first exchange) wins. `wr_ok` reports which writes were taken.
// Reading is combinational; `rd_clr` frees the read location on the clock edge, so every
// connection lasts one frame and is set up again by the next scan.
// Timing: writes and clear on the rising edge; synchronous active-high reset frees all.
// That the control memory holds inlet addresses per outlet follows the published
// sequential-write / random-read scheme; the busy rule, the port priority and the
// clear-on-read are this design's.
module control_memory
  import switching_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned N_WR = 2,
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           wr_en   [N_WR],
  input  logic [W-1:0]   wr_addr [N_WR],
  input  cm_entry_t      wr_data [N_WR],
  output logic           wr_ok   [N_WR],
  input  logic [W-1:0]   rd_addr,
  input  logic           rd_clr,
  output cm_entry_t      rd_data
);

  cm_entry_t mem [N];

  // Accept a write when the outlet is free and no lower-numbered port takes it this clock.
  always_comb begin
    for (int unsigned p = 0; p < N_WR; p++) begin
      wr_ok[p] = wr_en[p] && !mem[wr_addr[p]].valid;
      for (int unsigned q = 0; q < p; q++)
        if (wr_en[q] && wr_addr[q] == wr_addr[p]) wr_ok[p] = 1'b0;
    end
  end

  assign rd_data = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < N; i++) mem[i] <= '0;
    end else begin
      if (rd_clr) mem[rd_addr].valid <= 1'b0;
      for (int unsigned p = 0; p < N_WR; p++)
        if (wr_ok[p]) mem[wr_addr[p]] <= wr_data[p];
    end
  end

endmodule
