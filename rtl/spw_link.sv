// spw_link: SpaceWire link interface, the top level.
//
// It wires the eight modules of the link as the document's block diagram shows.
//   controller          link state machine; drives TX_RESET, RX_RESET, Send_*
//   timer               After6.4 / After12.8 for the controller
//   transmitter         DS encoder, host TX interface, Time-Code input
//   tx_baudratecounter  TX_Clockenable, the transmit bit rate
//   receiver            DS decoder, host RX interface, Time-Code output
//   recovery            RX_CLOCK = Datain ^ Strobein
//   credit_counter      NoCredit for the transmitter, EightMore FCT requests, CreditError
//   error_notification  error record for the host, ErrorReadDone for the controller
// Host side: TX_WRITE / TX_DATA / TX_READY for sending N-Chars; BUFFER_WRITE / RX_DATA with
// BUFFER_READY for receiving them; TICK_IN / TIME_IN / CONTROL_FLAGS_IN and TICK_OUT /
// TIME_OUT / CONTROL_FLAGS_OUT for Time-Codes; LINK_START, LINK_DISABLE and AUTOSTART for
// link control. fifo_empty tells the controller that the host has saved its data (the
// FIFO_Empty condition of ErrAnalysis_DataSave). err_read / err_status / err_count read
// the error record. N-Chars are 9 bits: bit 8 is the control flag (EOP = 9'h100,
// EEP = 9'h101). Everything runs on one clock, CLOCK, with a synchronous active-high
// RESET. The defaults assume 100 MHz: 6.4 us and 12.8 us timeouts, 10 Mb/s, 850 ns
// disconnect.
module spw_link
  import spw_pkg::*;
#(
  parameter int unsigned T6U4_CYC    = T6U4_CYCLES,
  parameter int unsigned T12U8_CYC   = T12U8_CYCLES,
  parameter int unsigned DISC_CYC    = DEF_DISC_CYCLES,
  parameter int unsigned TX_DIV      = TX_DIVISOR
) (
  input  logic               clk,              // CLOCK
  input  logic               rst,              // RESET
  // link control
  input  logic               link_start,       // LINK START
  input  logic               link_disable,     // LINK DISABLE
  input  logic               autostart,        // AUTOSTART
  // transmit host interface
  input  logic               tx_write,         // TX_WRITE
  input  logic [NCHAR_W-1:0] tx_data,          // TX DATA / CONTROL FLAG
  output logic               tx_ready,         // TX_READY
  input  logic               tick_in,          // TICK_IN
  input  logic [5:0]         time_in,          // TIME_IN
  input  logic [1:0]         ctrl_flags_in,    // CONTROL FLAGS IN
  // receive host interface
  input  logic               buffer_ready,     // BUFFER_READY
  output logic               buffer_write,     // BUFFER WRITE
  output logic [NCHAR_W-1:0] rx_data,          // RX DATA / CONTROL FLAG
  output logic               tick_out,         // TICK_OUT
  output logic [5:0]         time_out,         // TIME_OUT
  output logic [1:0]         ctrl_flags_out,   // CONTROL FLAGS OUT
  // error analysis
  input  logic               fifo_empty,       // FIFO_Empty: host data saved
  input  logic               err_read,
  output logic [3:0]         err_status,       // {credit, escape, parity, disconnect}
  output logic [7:0]         err_count,
  // line
  input  logic               d_in,             // Datain
  input  logic               s_in,             // Strobein
  output logic               d_out,            // Dataout
  output logic               s_out,            // Strobeout
  output logic               rx_clock,         // RX_CLOCK
  // status
  output link_state_t        state,            // controller state, S0..S6
  output logic               first_null_gone,  // FirstNULL_gone
  output logic               nchar_on_trip,    // NCharOnTrip
  output logic [$clog2(DEF_MAX_CREDIT+1)-1:0] tx_credit,  // N-Chars this end may still send
  output logic [$clog2(DEF_MAX_CREDIT+1)-1:0] rx_credit   // N-Chars this end has granted
);
  logic after_6u4, after_12u8, timer_restart;
  logic tx_reset, rx_reset, send_null, send_fct, send_all;
  logic got_null, got_fct, got_nchar, got_timecode;
  logic parity_err, escape_err, disc_err, rx_err, credit_err;
  logic no_credit, eight_more, nchar_sent, tx_clk_en, err_read_done;

  spw_controller u_controller (
    .clk(clk), .rst(rst), .after_6u4(after_6u4), .after_12u8(after_12u8),
    .timer_restart(timer_restart), .got_null(got_null), .got_fct(got_fct),
    .got_nchar(got_nchar), .got_timecode(got_timecode), .rx_err(rx_err),
    .credit_err(credit_err), .link_start(link_start), .link_disable(link_disable),
    .autostart(autostart), .fifo_empty(fifo_empty), .err_read_done(err_read_done),
    .tx_reset(tx_reset), .rx_reset(rx_reset), .send_null(send_null),
    .send_fct(send_fct), .send_all(send_all), .state(state));

  spw_timer #(.T6U4(T6U4_CYC), .T12U8(T12U8_CYC)) u_timer (
    .clk(clk), .rst(rst), .restart(timer_restart),
    .after_6u4(after_6u4), .after_12u8(after_12u8));

  spw_tx_baudrate_counter #(.DIVISOR(TX_DIV)) u_baud (
    .clk(clk), .rst(tx_reset), .tx_clk_en(tx_clk_en));

  spw_transmitter u_tx (
    .clk(clk), .tx_reset(tx_reset), .tx_clk_en(tx_clk_en), .send_null(send_null),
    .send_fct(send_fct), .send_all(send_all), .eight_more(eight_more),
    .no_credit(no_credit), .tick_in(tick_in), .time_in(time_in),
    .ctrl_flags_in(ctrl_flags_in), .tx_write(tx_write), .tx_data(tx_data),
    .tx_ready(tx_ready), .d_out(d_out), .s_out(s_out),
    .first_null_gone(first_null_gone), .nchar_on_trip(nchar_on_trip),
    .nchar_sent(nchar_sent));

  spw_receiver #(.DISC_CYCLES(DISC_CYC)) u_rx (
    .clk(clk), .rx_reset(rx_reset), .d_in(d_in), .s_in(s_in), .got_null(got_null),
    .got_fct(got_fct), .got_nchar(got_nchar), .got_timecode(got_timecode),
    .rx_data(rx_data), .buffer_write(buffer_write), .time_out(time_out),
    .ctrl_flags_out(ctrl_flags_out), .tick_out(tick_out), .parity_err(parity_err),
    .escape_err(escape_err), .disc_err(disc_err), .rx_err(rx_err));

  spw_recovery u_recovery (.d_in(d_in), .s_in(s_in), .rx_clock(rx_clock));

  spw_credit_counter #(.FCT_CREDIT(DEF_FCT_CREDIT), .MAX_CREDIT(DEF_MAX_CREDIT)) u_credit (
    .clk(clk), .tx_reset(tx_reset), .rx_reset(rx_reset), .got_fct(got_fct),
    .nchar_sent(nchar_sent), .got_nchar(got_nchar), .buffer_ready(buffer_ready),
    .no_credit(no_credit), .eight_more(eight_more), .credit_err(credit_err),
    .tx_credit(tx_credit), .rx_credit(rx_credit));

  spw_error_notification u_errnote (
    .clk(clk), .rst(rst), .disc_err(disc_err), .parity_err(parity_err),
    .escape_err(escape_err), .credit_err(credit_err), .err_read(err_read),
    .err_status(err_status), .err_count(err_count), .err_read_done(err_read_done));

  // Document properties 1-8: while the transmitter is reset, both lines are low.
  assert property (@(posedge clk) disable iff (rst) ##1 $past(tx_reset) |-> (!d_out && !s_out));
endmodule
