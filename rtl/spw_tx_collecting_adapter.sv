// spw_tx_collecting_adapter: CollectingHandshakeAdapter of the transmitter.
//
// It collects FCT requests. Each EightMore pulse asks for one more FCT to be sent; the
// adapter counts the requests that are not yet served and holds Request high while the
// count is non-zero. Each Acknowledge from TX_Controller, one cycle long, takes one
// request away. Requests can arrive before FCTs may be sent, so the counter holds up to
// MAX_PENDING of them: seven FCTs make the 56-character credit limit. The document
// names the adapter and its EightMore, Request and Acknowledge signals. The counter is
// this design's reading of "collecting". It is cleared by the transmitter reset.
module spw_tx_collecting_adapter #(
  parameter int unsigned MAX_PENDING = 7
) (
  input  logic clk,
  input  logic rst,
  input  logic eight_more,   // EightMore: one more FCT wanted
  input  logic ack,          // Acknowledge: one FCT taken for sending
  output logic req           // Request: at least one FCT pending
);
  localparam int unsigned CW = $clog2(MAX_PENDING + 1);
  logic [CW-1:0] pending;
  logic inc, dec;

  assign inc = eight_more && (pending != CW'(MAX_PENDING));
  assign dec = ack && (pending != '0);

  always_ff @(posedge clk) begin
    if (rst)              pending <= '0;
    else if (inc && !dec) pending <= pending + 1'b1;
    else if (dec && !inc) pending <= pending - 1'b1;
  end

  assign req = (pending != '0);
endmodule
