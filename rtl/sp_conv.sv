// sp_conv: serial-to-parallel converter for one subscriber inlet.
//
// Shifts the line bit `sin` into a W-bit shift register, most significant bit first, on
// every rising clock edge with `shift` high. On the shift edge that also has `last` high
// (the final bit of a word) the completed word, including that bit, is copied into the
// holding register `word`, which the switch then reads for a whole frame while the next
// word shifts in. Synchronous active-high reset clears both registers.
// The published structure places a serial-to-parallel converter at the inlets; the bit
// order, the holding register and the word framing are this design's.
module sp_conv #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         shift,
  input  logic         last,
  input  logic         sin,
  output logic [W-1:0] word
);

  logic [W-2:0] sreg;   // the W-1 bits received so far; the last bit completes the word
  logic [W-1:0] next;

  assign next = {sreg, sin};

  always_ff @(posedge clk) begin
    if (rst) begin
      sreg <= '0;
      word <= '0;
    end else if (shift) begin
      sreg <= next[W-2:0];
      if (last) word <= next;
    end
  end

endmodule
