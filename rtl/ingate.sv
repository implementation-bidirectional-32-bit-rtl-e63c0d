// ingate: inlet gating for one exchange.
//
// Connects the single write path of the memories to one of N subscriber lines at a time:
// `word` is the opcode on line `sel`. The scan counter drives `sel`, so over N clocks every
// inlet is offered to the memories once. Purely combinational; the memories sample `word`
// on the clock edge. The published design describes the in gate as the gating mechanism in
// front of the memory; making it an N:1 multiplexer of whole 32-bit words is this design's.
module ingate
  import switching_pkg::*;
#(
  parameter int unsigned N = 16,
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  opcode_t        lines [N],
  input  logic [W-1:0]   sel,
  output opcode_t        word
);

  always_comb begin
    word = '0;
    for (int unsigned i = 0; i < N; i++)
      if (sel == W'(i)) word = lines[i];
  end

endmodule
