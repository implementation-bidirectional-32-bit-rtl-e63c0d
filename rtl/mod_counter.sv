// mod_counter: modulo-N slot counter, one per side of the switch (ingate and outgate).
//
// Counts 0,1,...,N-1,0,... advancing by one on each rising clock edge while `en` is high.
// `clr` (synchronous, above `en`) returns it to 0. `last` is high while the count is N-1,
// so `en && last` marks the clock edge on which a full scan of N lines completes.
// The published design names a modular counter at the ingate and at the outgate; the
// enable/clear controls and the `last` flag are this design's choice.
module mod_counter #(
  parameter int unsigned N = 16,
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst,    // synchronous, active high
  input  logic         clr,
  input  logic         en,
  output logic [W-1:0] count,
  output logic         last
);

  assign last = (count == W'(N - 1));

  always_ff @(posedge clk) begin
    if (rst || clr)
      count <= '0;
    else if (en)
      count <= last ? '0 : count + W'(1);
  end

endmodule
