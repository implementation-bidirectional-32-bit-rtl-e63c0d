// switching_system: the two-exchange switch with serial subscriber lines.
//
// Every one of the 2 x 16 subscribers has one serial input line (rx) and one serial output
// line (tx), each carrying one 32-bit opcode word per frame, most significant bit first.
// A serial-to-parallel converter per inlet assembles the incoming word, the switching core
// (module `switching`) switches the parallel words, and a parallel-to-serial converter per
// outlet sends the delivered word back out.
// Framing: a frame is the core's 32 enabled clocks (16 scan + 16 delivery); the bit
// position counter counts them, 0..31. `rx_sync` is high during position 0:
//   - rx: bit 31-p of a word is sampled at the end of position p; the finished word is
//     latched at the end of position 31 and is switched during the next frame.
//   - tx: each outlet's converter loads the word delivered in the previous frame at the end
//     of position 0, so bit 31 is on tx during position 1, bit 31-p during position p+1,
//     and bit 0 during position 0 of the following frame. `tx_sync` is high during
//     position 1, the first bit of an outgoing word.
// Latency: a word shifted in during frame k is delivered to the outlet registers in frame
// k+1 and leaves on tx starting at position 1 of frame k+2.
// While `enable` is low nothing shifts and nothing switches. Synchronous active-high reset.
// The converters at inlets and outlets follow the published structure; the bit order,
// the framing and the sync outputs are this design's.
module switching_system
  import switching_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            enable,
  input  logic            rx [N_EXCH][N_USERS],
  output logic            tx [N_EXCH][N_USERS],
  output logic            rx_sync,
  output logic            tx_sync,
  output logic [ID_W-1:0] caller_id [N_EXCH][N_USERS],
  output phase_t          phase,
  output logic            frame_done,
  output logic            call_setup   [N_EXCH],
  output logic            call_blocked [N_EXCH]
);

  localparam int unsigned FRAME = 2 * N_USERS;   // clocks, and bits per word
  localparam int unsigned PW    = $clog2(FRAME);

  opcode_t       line_in  [N_EXCH][N_USERS];
  opcode_t       line_out [N_EXCH][N_USERS];
  logic          bit_en, bit_last;
  logic [PW-1:0] bit_pos;

  // One serial bit per enabled frame clock, in step with the core's slots.
  assign bit_en  = enable && (phase == PH_SCAN || phase == PH_DELIVER);
  assign rx_sync = bit_en && (bit_pos == PW'(0));
  assign tx_sync = bit_en && (bit_pos == PW'(1));

  mod_counter #(.N(FRAME)) u_bit_cnt (
    .clk, .rst, .clr(1'b0), .en(bit_en), .count(bit_pos), .last(bit_last)
  );

  switching u_core (
    .clk, .rst, .enable, .line_in, .line_out, .caller_id, .phase, .frame_done,
    .call_setup, .call_blocked
  );

  for (genvar e = 0; e < N_EXCH; e++) begin : g_ex
    for (genvar u = 0; u < N_USERS; u++) begin : g_line
      sp_conv #(.W($bits(opcode_t))) u_sp (
        .clk, .rst, .shift(bit_en), .last(bit_last), .sin(rx[e][u]), .word(line_in[e][u])
      );
      ps_conv #(.W($bits(opcode_t))) u_ps (
        .clk, .rst, .en(bit_en), .load(bit_pos == PW'(0)), .pin(line_out[e][u]),
        .sout(tx[e][u])
      );
    end
  end

endmodule
