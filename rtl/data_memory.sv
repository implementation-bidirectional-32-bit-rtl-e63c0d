// data_memory: per-exchange data memory, N locations of {enable, 16-bit payload}.
//
// Sequential write, random read. During the scan phase location i receives the word of
// inlet i (one location per inlet, written through one write port). During the delivery
// phase the two outlet sides (this exchange and the other one) each read one location
// chosen by their control memory, so there are two asynchronous read ports.
// Timing: write on the rising edge when `we` is high; reads are combinational.
// Reset (synchronous, active high) clears every location.
// The size, 16 locations of 17 bits, is the published one; the read-port count and the
// meaning of the 17th bit (the inlet's enable bit) are this design's.
module data_memory
  import switching_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned N_RD   = 2,
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           we,
  input  logic [W-1:0]   waddr,
  input  dm_word_t       wdata,
  input  logic [W-1:0]   raddr [N_RD],
  output dm_word_t       rdata [N_RD]
);

  dm_word_t mem [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < N; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb
    for (int unsigned p = 0; p < N_RD; p++) rdata[p] = mem[raddr[p]];

endmodule
