// callerid_memory: per-exchange caller-ID memory, 2 x N locations of subscriber numbers.
//
// The source half (N locations) is written in the scan phase: location i holds the caller
// number (src field) of inlet i. Two combinational read ports let both outlet sides look up
// the number of the inlet feeding them. The destination half (N locations) is written in
// the delivery phase: location j holds the number of the subscriber calling outlet j, and
// all of it is visible on `dst_ids` so each called subscriber can see who is calling.
// Timing: writes on the rising edge; synchronous active-high reset clears both halves.
// The 16 source plus 16 destination locations are the published organisation; the port
// structure is this design's.
module callerid_memory
  import switching_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned N_RD = 2,
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            src_we,
  input  logic [W-1:0]    src_addr,
  input  logic [ID_W-1:0] src_id,
  input  logic [W-1:0]    src_raddr [N_RD],
  output logic [ID_W-1:0] src_rid   [N_RD],
  input  logic            dst_we,
  input  logic [W-1:0]    dst_addr,
  input  logic [ID_W-1:0] dst_id,
  output logic [ID_W-1:0] dst_ids   [N]
);

  logic [ID_W-1:0] src_mem [N];
  logic [ID_W-1:0] dst_mem [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < N; i++) begin
        src_mem[i] <= '0;
        dst_mem[i] <= '0;
      end
    end else begin
      if (src_we) src_mem[src_addr] <= src_id;
      if (dst_we) dst_mem[dst_addr] <= dst_id;
    end
  end

  always_comb
    for (int unsigned p = 0; p < N_RD; p++) src_rid[p] = src_mem[src_raddr[p]];

  assign dst_ids = dst_mem;

endmodule
