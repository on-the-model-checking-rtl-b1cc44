// spw_tx_timecode_reg: TimeCodeRegister of the transmitter.
//
// When Tick_IN is high it stores Time_In[5:0] and TimeControlFlag_In[1:0] as Time_Out
// and TimeControlFlag_Out. The Time-Code then carries the values present at the tick, as
// the document requires. The outputs feed TX_Register.
module spw_tx_timecode_reg (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick_in,        // Tick_IN
  input  logic [5:0] time_in,        // Time_In
  input  logic [1:0] ctrl_flags_in,  // TimeControlFlag_In
  output logic [5:0] time_out,       // Time_Out
  output logic [1:0] ctrl_flags_out  // TimeControlFlag_Out
);
  always_ff @(posedge clk) begin
    if (rst) begin
      time_out       <= '0;
      ctrl_flags_out <= '0;
    end else if (tick_in) begin
      time_out       <= time_in;
      ctrl_flags_out <= ctrl_flags_in;
    end
  end
endmodule
