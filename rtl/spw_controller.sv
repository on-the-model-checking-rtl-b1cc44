// spw_controller: the link state machine.
//
// It has seven states, S0..S6: ErrorReset, ErrorWait, Ready, Started, Connecting, Run and
// ErrAnalysis_DataSave. They control what the transmitter may send and when the
// transmitter and receiver are held in reset. The transitions follow the document's state
// diagram and text:
//   ErrorReset  -> ErrorWait   after 6.4 us. Reset is low, because it is the synchronous
//                              reset of this flop.
//   ErrorWait   -> Ready       after 12.8 us
//   Ready       -> Started     when Link Enabled
//   Started     -> Connecting  when gotNULL
//   Connecting  -> Run         when gotFCT
//   Run         -> ErrAnalysis on a receive error, a credit error or Link Disabled
//   ErrAnalysis -> ErrorReset  when the data FIFO is empty AND the error has been read
// ErrorWait, Ready, Started and Connecting fall back to ErrorReset on a receive error
// (disconnect, parity or escape) or on any character other than a NULL: an FCT, N-Char or
// Time-Code. Connecting accepts an FCT, since that is its way forward. Started and
// Connecting also fall back after 12.8 us. The receiver reports parity and escape errors
// and characters only after its first NULL, so "after the gotNULL condition is set" holds
// by construction.
// Outputs, per state (document Figure 4): TX_Reset in S0, S1, S2 and S6. Send_NULL in S3-S5.
// Send_FCT in S4-S5. Send_All, the N-Chars and Time-Codes, in S5. RX_Reset is asserted
// only in ErrorReset. That is this design's reading; the document says only that the
// controller drives both resets.
// Link Enabled is !link_disable & (link_start | (autostart & got_null)), the usual
// SpaceWire definition; the document names the signals but not the equation.
// timer_restart is high in the cycle before a state change, so the timer counts from
// entry into every state. The state register is reset synchronously into ErrorReset.
module spw_controller
  import spw_pkg::*;
(
  input  logic        clk,
  input  logic        rst,            // RESET
  // timer
  input  logic        after_6u4,
  input  logic        after_12u8,
  output logic        timer_restart,
  // receiver status
  input  logic        got_null,       // level: a NULL has been received since RX reset
  input  logic        got_fct,        // pulse
  input  logic        got_nchar,      // pulse
  input  logic        got_timecode,   // pulse
  input  logic        rx_err,         // pulse: disconnect, parity or escape error
  input  logic        credit_err,     // pulse
  // host
  input  logic        link_start,
  input  logic        link_disable,
  input  logic        autostart,
  input  logic        fifo_empty,     // FIFO_Empty: data saved
  input  logic        err_read_done,  // ErrorReadDone from error notification
  // transmitter / receiver control
  output logic        tx_reset,
  output logic        rx_reset,
  output logic        send_null,
  output logic        send_fct,
  output logic        send_all,
  output link_state_t state
);
  link_state_t state_nx;
  logic link_enabled, bad_char;

  assign link_enabled = !link_disable && (link_start || (autostart && got_null));
  assign bad_char     = got_fct || got_nchar || got_timecode;

  always_comb begin
    state_nx = state;
    unique case (state)
      ST_ERROR_RESET:  if (after_6u4)                                    state_nx = ST_ERROR_WAIT;
      ST_ERROR_WAIT:   if (rx_err || bad_char)                           state_nx = ST_ERROR_RESET;
                       else if (after_12u8)                              state_nx = ST_READY;
      ST_READY:        if (rx_err || bad_char)                           state_nx = ST_ERROR_RESET;
                       else if (link_enabled)                            state_nx = ST_STARTED;
      ST_STARTED:      if (rx_err || bad_char || after_12u8)             state_nx = ST_ERROR_RESET;
                       else if (got_null)                                state_nx = ST_CONNECTING;
      ST_CONNECTING:   if (rx_err || got_nchar || got_timecode || after_12u8)
                                                                         state_nx = ST_ERROR_RESET;
                       else if (got_fct)                                 state_nx = ST_RUN;
      ST_RUN:          if (rx_err || credit_err || link_disable)         state_nx = ST_ERR_ANALYSIS;
      ST_ERR_ANALYSIS: if (fifo_empty && err_read_done)                  state_nx = ST_ERROR_RESET;
      default:                                                           state_nx = ST_ERROR_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= ST_ERROR_RESET;
    else     state <= state_nx;
  end

  assign timer_restart = rst || (state_nx != state);

  assign tx_reset  = (state inside {ST_ERROR_RESET, ST_ERROR_WAIT, ST_READY, ST_ERR_ANALYSIS});
  assign rx_reset  = (state == ST_ERROR_RESET);
  assign send_null = (state inside {ST_STARTED, ST_CONNECTING, ST_RUN});
  assign send_fct  = (state inside {ST_CONNECTING, ST_RUN});
  assign send_all  = (state == ST_RUN);

endmodule
