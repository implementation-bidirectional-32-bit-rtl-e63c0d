// switch_ctrl: frame controller of the switch.
//
// A frame is two phases. Phase 1 (scan) enables the ingate counter: one inlet of each
// exchange per clock, N clocks in all, is written into the memories in order. Phase 2
// (deliver) enables the outgate counter: one outlet of each exchange per clock, N clocks,
// is served from the data memory at the address its control memory holds. After the last
// delivery slot the next scan starts at once, so a frame lasts 2*N clocks.
// After reset the controller waits in IDLE until `enable` is high. While `enable` is low
// nothing advances and no memory or outlet is written: the phase and both counters hold.
// `frame_done` pulses for one clock on the edge that ends a delivery phase.
// Inputs `scan_last`/`dlv_last` are the counters' last-slot flags.
// The two phases and the 16-clock scan are published; the IDLE state, pausing on a low
// enable and the back-to-back frames are this design's.
module switch_ctrl
  import switching_pkg::*;
(
  input  logic   clk,
  input  logic   rst,        // synchronous, active high
  input  logic   enable,
  input  logic   scan_last,
  input  logic   dlv_last,
  output phase_t phase,
  output logic   scan_en,
  output logic   dlv_en,
  output logic   frame_done
);

  assign scan_en = enable && (phase == PH_SCAN);
  assign dlv_en  = enable && (phase == PH_DELIVER);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase      <= PH_IDLE;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      unique case (phase)
        PH_IDLE:    if (enable) phase <= PH_SCAN;
        PH_SCAN:    if (scan_en && scan_last) phase <= PH_DELIVER;
        PH_DELIVER: if (dlv_en && dlv_last) begin
                      phase      <= PH_SCAN;
                      frame_done <= 1'b1;
                    end
        default:    phase <= PH_IDLE;
      endcase
    end
  end

endmodule
