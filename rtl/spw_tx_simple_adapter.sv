// spw_tx_simple_adapter: SimpleHandshakeAdapter of the transmitter.
//
// It turns the Tick_IN pulse into a Request that stays high until TX_Controller
// acknowledges it by starting a Time-Code. A second tick before the acknowledge does
// not queue a second request. The document names the adapter and its signals; the
// single-entry behaviour is this design's choice. It is cleared by the transmitter reset.
module spw_tx_simple_adapter (
  input  logic clk,
  input  logic rst,
  input  logic tick_in,   // Tick_IN
  input  logic ack,       // Acknowledge: Time-Code taken for sending
  output logic req        // Request
);
  always_ff @(posedge clk) begin
    if (rst)          req <= 1'b0;
    else if (tick_in) req <= 1'b1;
    else if (ack)     req <= 1'b0;
  end
endmodule
