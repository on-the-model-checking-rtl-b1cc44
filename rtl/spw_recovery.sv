// spw_recovery: receive clock recovery.
//
// Data-strobe encoding changes exactly one of the two lines in every bit period, so the
// XOR of Datain and Strobein toggles once per received bit. That XOR is the recovered
// receive clock, RX_CLOCK, as the document describes. The block is purely combinational.
// The receiver of this design samples the lines with the system clock and does not use
// RX_CLOCK as a clock; RX_CLOCK is brought out of the link for users who want it.
module spw_recovery (
  input  logic d_in,      // Datain
  input  logic s_in,      // Strobein
  output logic rx_clock   // RX_CLOCK = Datain ^ Strobein
);
  assign rx_clock = d_in ^ s_in;
endmodule
