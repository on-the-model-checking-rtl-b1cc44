// spw_env_fsm: behavioural model of the link controller, as seen by the transmitter.
//
// It is the abstract environment state machine used to verify the transmitter on its own.
// It steps through S0..S6 (ErrorReset, ErrorWait, Ready, Started, Connecting, Run,
// ErrAnalysis_DataSave), one state per `advance` pulse; S6 goes back to S0. There are no
// link errors or timers. The outputs per state are the levels of the transmitter
// interface: TX_Reset in S0-S2 and S6, Send_NULL in S3-S5, Send_FCT in S4-S5, Send_All in S5.
// Testbench use only.
module spw_env_fsm (
  input  logic       clk,
  input  logic       rst,
  input  logic       advance,
  output logic [2:0] state,
  output logic       tx_reset,
  output logic       send_null,
  output logic       send_fct,
  output logic       send_all
);
  always_ff @(posedge clk) begin
    if (rst)          state <= 3'd0;
    else if (advance) state <= (state == 3'd6) ? 3'd0 : state + 3'd1;
  end

  assign tx_reset  = (state <= 3'd2) || (state == 3'd6);
  assign send_null = (state >= 3'd3) && (state <= 3'd5);
  assign send_fct  = (state == 3'd4) || (state == 3'd5);
  assign send_all  = (state == 3'd5);
endmodule
