// spw_credit_counter: FCT flow-control credit for both directions.
//
// Transmit side: each FCT received (got_fct) gives FCT_CREDIT = 8 more N-Chars to send.
// Each N-Char started (nchar_sent) uses one. NoCredit is high while the credit is zero,
// which stalls the transmitter's N-Char path. Receiving an FCT that would raise the
// credit above MAX_CREDIT = 56 is a credit error.
// Receive side: the counter keeps the credit this end has granted. While BUFFER_READY is
// high and another eight N-Chars fit under MAX_CREDIT, it pulses EightMore. Each pulse
// asks the transmitter to send one FCT, and the counter adds 8 to the granted credit at
// once. Each N-Char received (got_nchar) uses one. An N-Char that arrives with no granted
// credit left is also a credit error, so the host buffer cannot overflow.
// The document gives the counter's purpose: NoCredit, CreditError, gotFCT, and "an FCT
// ... ready to accept another 8 N-Chars". The limit of 56, the receive-side bookkeeping
// and BUFFER_READY as the room indication are this design's choices. The transmit credit
// clears on TX_Reset. The granted credit clears on RX_Reset; EightMore is withheld while
// the transmitter is in reset, because requests made then would be lost.
module spw_credit_counter
  import spw_pkg::*;
#(
  parameter int unsigned FCT_CREDIT = 8,
  parameter int unsigned MAX_CREDIT = 56
) (
  input  logic clk,
  input  logic tx_reset,
  input  logic rx_reset,
  input  logic got_fct,       // gotFCT
  input  logic nchar_sent,    // transmitter started an N-Char
  input  logic got_nchar,     // receiver delivered an N-Char
  input  logic buffer_ready,  // BUFFER_READY: host has room
  output logic no_credit,     // NoCredit
  output logic eight_more,    // EightMore: request one FCT
  output logic credit_err,    // CreditError (pulse)
  output logic [$clog2(MAX_CREDIT+1)-1:0] tx_credit,
  output logic [$clog2(MAX_CREDIT+1)-1:0] rx_credit
);
  localparam int unsigned CW = $clog2(MAX_CREDIT + 1);

  logic tx_over, rx_under, tx_err_q, rx_err_q;

  assign tx_over  = got_fct && (int'(tx_credit) + FCT_CREDIT > MAX_CREDIT);
  assign rx_under = got_nchar && (rx_credit == '0);
  assign eight_more = !tx_reset && !rx_reset && buffer_ready &&
                      (int'(rx_credit) + FCT_CREDIT <= MAX_CREDIT);

  always_ff @(posedge clk) begin
    if (tx_reset) begin
      tx_credit <= '0;
      tx_err_q  <= 1'b0;
    end else begin
      tx_err_q <= tx_over;
      unique case ({got_fct && !tx_over, nchar_sent && tx_credit != '0})
        2'b10:   tx_credit <= tx_credit + CW'(FCT_CREDIT);
        2'b01:   tx_credit <= tx_credit - 1'b1;
        2'b11:   tx_credit <= tx_credit + CW'(FCT_CREDIT - 1);
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rx_reset) begin
      rx_credit <= '0;
      rx_err_q  <= 1'b0;
    end else begin
      rx_err_q <= rx_under;
      unique case ({eight_more, got_nchar && !rx_under})
        2'b10:   rx_credit <= rx_credit + CW'(FCT_CREDIT);
        2'b01:   rx_credit <= rx_credit - 1'b1;
        2'b11:   rx_credit <= rx_credit + CW'(FCT_CREDIT - 1);
        default: ;
      endcase
    end
  end

  assign no_credit  = (tx_credit == '0);
  assign credit_err = tx_err_q || rx_err_q;
endmodule
