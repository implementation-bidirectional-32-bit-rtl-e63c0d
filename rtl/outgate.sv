// outgate: outlet gating for one exchange.
//
// Hands the word read out of the memories to the outlet selected by the outgate counter and
// holds it there: one 32-bit register per outlet, written on the rising edge when `we` is
// high at location `sel`, visible on `lines` from the next cycle until it is written again
// in the next frame. Synchronous active-high reset clears all outlets.
// The out gate as the gating mechanism after the memory is the published structure; holding
// each outlet word in a register is this design's.
module outgate
  import switching_pkg::*;
#(
  parameter int unsigned N = 16,
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [W-1:0] sel,
  input  opcode_t      word,
  output opcode_t      lines [N]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < N; i++) lines[i] <= '0;
    end else if (we) begin
      lines[sel] <= word;
    end
  end

endmodule
