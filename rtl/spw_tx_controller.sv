// spw_tx_controller: TX_Controller of the transmitter.
//
// It decides what the transmitter sends next. TX_Register raises `need` while it has no
// bits left. On the next TX_Clockenable the controller raises `provide` and names the
// character type. In the same cycle it acknowledges the source it served. The choice
// follows the document:
//   Time-Code  if Send_All and a tick is pending. A tick waits only for the current
//              character to finish.
//   FCT        if Send_FCT, an FCT request is pending and the first NULL has gone out.
//   N-Char     if Send_All, the host has written one and there is credit (no NoCredit).
//   NULL       otherwise, if Send_NULL.
// That order of priority is the usual SpaceWire one; the document lists the types but
// not their order. Nothing is provided while none of the Send_* inputs allows it. The
// block is combinational.
module spw_tx_controller
  import spw_pkg::*;
(
  input  logic     tx_clk_en,
  input  logic     need,            // TX_Register is free for a new character
  input  logic     send_null,
  input  logic     send_fct,
  input  logic     send_all,
  input  logic     first_null_gone,
  input  logic     no_credit,
  input  logic     fct_req,         // from the collecting adapter
  input  logic     tick_req,        // from the simple adapter
  input  logic     nchar_valid,     // from DataCharacterReg
  output logic     provide,         // Provide: load a character into TX_Register
  output tx_char_t sel,
  output logic     fct_ack,
  output logic     tick_ack,
  output logic     nchar_take
);
  logic slot;
  assign slot = tx_clk_en && need;

  always_comb begin
    provide    = 1'b0;
    sel        = CH_NULL;
    fct_ack    = 1'b0;
    tick_ack   = 1'b0;
    nchar_take = 1'b0;
    if (slot) begin
      if (send_all && tick_req) begin
        provide = 1'b1; sel = CH_TIME;  tick_ack = 1'b1;
      end else if (send_fct && fct_req && first_null_gone) begin
        provide = 1'b1; sel = CH_FCT;   fct_ack = 1'b1;
      end else if (send_all && nchar_valid && !no_credit) begin
        provide = 1'b1; sel = CH_NCHAR; nchar_take = 1'b1;
      end else if (send_null) begin
        provide = 1'b1; sel = CH_NULL;
      end
    end
  end
endmodule
