// spw_tx_baudrate_counter: transmit bit-rate divider.
//
// It counts system clock cycles and raises TX_Clockenable for one cycle in every DIVISOR
// cycles. The transmitter moves one bit per enable, so the line bit rate is
// clk / DIVISOR. The document says only that this counter controls the frequency of what
// the transmitter sends. A fixed divider and its default of 10, which gives 10 Mb/s from
// a 100 MHz clock, are this design's own choices. Reset is synchronous and active high.
module spw_tx_baudrate_counter #(
  parameter int unsigned DIVISOR = 10
) (
  input  logic clk,
  input  logic rst,
  output logic tx_clk_en    // TX_Clockenable: high one cycle every DIVISOR cycles
);
  localparam int unsigned CW = (DIVISOR > 1) ? $clog2(DIVISOR) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      tx_clk_en <= 1'b0;
    end else if (cnt == CW'(DIVISOR - 1)) begin
      cnt       <= '0;
      tx_clk_en <= 1'b1;
    end else begin
      cnt       <= cnt + 1'b1;
      tx_clk_en <= 1'b0;
    end
  end
endmodule
