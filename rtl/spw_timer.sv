// spw_timer: link initialisation timeouts.
//
// The counter restarts whenever `restart` is high. It is the controller's state-change
// signal, so time is measured from entry into the current state. after_6u4 is high from
// the T6U4-th cycle after a restart and after_12u8 from the T12U8-th. A state that leaves
// on one of them therefore lasts exactly T6U4 or T12U8 cycles. Both stay high until the
// next restart. The two delays, 6.4 us and 12.8 us, come from the
// document. Their defaults in cycles assume a 100 MHz system clock. The counter stops at
// T12U8 - 1, so it never wraps. Reset is synchronous and active high.
module spw_timer #(
  parameter int unsigned T6U4  = 640,
  parameter int unsigned T12U8 = 1280
) (
  input  logic clk,
  input  logic rst,
  input  logic restart,     // controller entered a new state
  output logic after_6u4,   // After6.4
  output logic after_12u8   // After12.8
);
  localparam int unsigned CW = $clog2(T12U8 + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || restart)              cnt <= '0;
    else if (cnt != CW'(T12U8 - 1))  cnt <= cnt + 1'b1;
  end

  assign after_6u4  = (cnt >= CW'(T6U4 - 1));
  assign after_12u8 = (cnt == CW'(T12U8 - 1));
endmodule
