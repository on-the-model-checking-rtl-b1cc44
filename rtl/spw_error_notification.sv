// spw_error_notification: link error recording for the host.
//
// Each error pulse (disconnect, parity, escape, credit) sets its bit in a sticky status
// register, err_status = {credit, escape, parity, disconnect}, and counts in a saturating
// 8-bit error counter. The host reads the register by raising err_read for one cycle.
// This clears the bits that were set, unless an error of the same kind arrives in the
// same cycle. ErrorReadDone is high while no unread error is held. The controller leaves
// ErrAnalysis_DataSave only when ErrorReadDone and FIFO_Empty are both high. The document
// gives the block's purpose and the ErrorReadDone signal. The register layout, the
// counter and the read protocol are this design's choices. The block is reset only by
// the system reset, so the record survives the link's own reset.
module spw_error_notification (
  input  logic       clk,
  input  logic       rst,
  input  logic       disc_err,
  input  logic       parity_err,
  input  logic       escape_err,
  input  logic       credit_err,       // CreditError
  input  logic       err_read,         // host reads and clears err_status
  output logic [3:0] err_status,
  output logic [7:0] err_count,
  output logic       err_read_done     // ErrorReadDone
);
  logic [3:0] new_err;
  assign new_err = {credit_err, escape_err, parity_err, disc_err};

  always_ff @(posedge clk) begin
    if (rst) begin
      err_status <= '0;
      err_count  <= '0;
    end else begin
      err_status <= (err_read ? 4'b0 : err_status) | new_err;
      if (new_err != '0 && err_count != 8'hFF) err_count <= err_count + 1'b1;
    end
  end

  assign err_read_done = (err_status == '0);
endmodule
