// spw_transmitter: SpaceWire transmitter.
//
// It takes 9-bit N-Chars from the host (TX_Ready / TX_Write / TX_Data) and Time-Codes on
// Tick_IN. It sends them, with FCTs and NULLs, as a data-strobe encoded bit stream on
// DataOut/StrobeOut, one bit per TX_Clockenable. The structure is the document's
// six-component one:
//   CollectingHandshakeAdapter  collects FCT requests (EightMore)
//   SimpleHandshakeAdapter      holds a Tick_IN request
//   DataCharacterReg            host N-Char register, drives TX_Ready
//   TimeCodeRegister            samples Time_In and the control flags at the tick
//   TX_Controller               picks the next character
//   TX_Register                 encodes and shifts it out
// The controller's Send_NULL, Send_FCT and Send_All say which characters are allowed. An
// N-Char is sent only while NoCredit is low. The whole transmitter is held in reset,
// with both lines low, by TX_Reset. nchar_sent is a one-cycle pulse when an N-Char
// starts. It feeds the credit counter and is this design's addition.
module spw_transmitter
  import spw_pkg::*;
(
  input  logic               clk,
  input  logic               tx_reset,        // TX_RESET
  input  logic               tx_clk_en,       // TX_Clockenable
  input  logic               send_null,
  input  logic               send_fct,
  input  logic               send_all,
  input  logic               eight_more,      // EightMore
  input  logic               no_credit,       // NoCredit
  input  logic               tick_in,         // Tick_IN
  input  logic [5:0]         time_in,         // Time_In
  input  logic [1:0]         ctrl_flags_in,   // TimeControlFlag_In
  input  logic               tx_write,        // TX_Write
  input  logic [NCHAR_W-1:0] tx_data,         // TX_Data / control flag
  output logic               tx_ready,        // TX_Ready
  output logic               d_out,           // DataOut
  output logic               s_out,           // StrobeOut
  output logic               first_null_gone, // FirstNULL_gone
  output logic               nchar_on_trip,   // NCharOnTrip
  output logic               nchar_sent
);
  logic fct_req, fct_ack, tick_req, tick_ack;
  logic nchar_valid, nchar_take, need, provide;
  logic [NCHAR_W-1:0] cargo;
  logic [5:0] time_val;
  logic [1:0] time_flags;
  tx_char_t sel;

  spw_tx_collecting_adapter u_fct_adapter (
    .clk(clk), .rst(tx_reset), .eight_more(eight_more), .ack(fct_ack), .req(fct_req));

  spw_tx_simple_adapter u_tick_adapter (
    .clk(clk), .rst(tx_reset), .tick_in(tick_in), .ack(tick_ack), .req(tick_req));

  spw_tx_data_char_reg u_data_reg (
    .clk(clk), .rst(tx_reset), .tx_write(tx_write), .tx_data(tx_data),
    .take(nchar_take), .tx_ready(tx_ready), .valid(nchar_valid), .cargo(cargo));

  spw_tx_timecode_reg u_time_reg (
    .clk(clk), .rst(tx_reset), .tick_in(tick_in), .time_in(time_in),
    .ctrl_flags_in(ctrl_flags_in), .time_out(time_val), .ctrl_flags_out(time_flags));

  spw_tx_controller u_ctrl (
    .tx_clk_en(tx_clk_en), .need(need), .send_null(send_null), .send_fct(send_fct),
    .send_all(send_all), .first_null_gone(first_null_gone), .no_credit(no_credit),
    .fct_req(fct_req), .tick_req(tick_req), .nchar_valid(nchar_valid),
    .provide(provide), .sel(sel), .fct_ack(fct_ack), .tick_ack(tick_ack),
    .nchar_take(nchar_take));

  spw_tx_register u_reg (
    .clk(clk), .rst(tx_reset), .tx_clk_en(tx_clk_en), .provide(provide), .sel(sel),
    .cargo(cargo), .time_val(time_val), .time_flags(time_flags), .need(need),
    .d_out(d_out), .s_out(s_out), .first_null_gone(first_null_gone),
    .nchar_on_trip(nchar_on_trip));

  assign nchar_sent = nchar_take;

  // A character is only provided when the register is free and a bit slot is due.
  assert property (@(posedge clk) disable iff (tx_reset) provide |-> (need && tx_clk_en));
  // The N-Char path never runs without credit.
  assert property (@(posedge clk) disable iff (tx_reset) nchar_take |-> !no_credit);
endmodule
