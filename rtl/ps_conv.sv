// ps_conv: parallel-to-serial converter for one subscriber outlet.
//
// On a rising clock edge with `en` high it either loads the W-bit word `pin` (when `load`
// is high) or shifts its register left by one. `sout` is the register's most significant
// bit, so after a load the word leaves most significant bit first, one bit per enabled
// clock, W bits in all. Synchronous active-high reset clears the register.
// The published structure places a parallel-to-serial converter at the outlets; the bit
// order and the load/shift control are this design's.
module ps_conv #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         load,
  input  logic [W-1:0] pin,
  output logic         sout
);

  logic [W-1:0] sreg;

  assign sout = sreg[W-1];

  always_ff @(posedge clk) begin
    if (rst)
      sreg <= '0;
    else if (en)
      sreg <= load ? pin : {sreg[W-2:0], 1'b0};
  end

endmodule
