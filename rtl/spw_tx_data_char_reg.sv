// spw_tx_data_char_reg: DataCharacterReg of the transmitter, the host N-Char register.
//
// The host handshake follows the document. TX_Ready is high while the register is empty.
// The host puts an N-Char on TX_Data and raises TX_Write. The register stores it on that
// clock edge and drops TX_Ready. The register empties again when TX_Controller takes
// the N-Char (take = 1 for one cycle). TX_Data is nine bits, the data byte plus the
// control flag of Figure 1's "TX DATA/CONTROL FLAG". Bit 8 set means EOP (bit 0 = 0) or
// EEP (bit 0 = 1); that encoding is this design's choice.
module spw_tx_data_char_reg
  import spw_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               tx_write,   // TX_Write
  input  logic [NCHAR_W-1:0] tx_data,    // TX_Data / control flag
  input  logic               take,       // N-Char handed to TX_Register
  output logic               tx_ready,   // TX_Ready
  output logic               valid,      // an N-Char is held
  output logic [NCHAR_W-1:0] cargo       // TX_Cargo
);
  always_ff @(posedge clk) begin
    if (rst) begin
      valid <= 1'b0;
      cargo <= '0;
    end else if (tx_write && tx_ready) begin
      valid <= 1'b1;
      cargo <= tx_data;
    end else if (take) begin
      valid <= 1'b0;
    end
  end

  assign tx_ready = !valid && !rst;
endmodule
