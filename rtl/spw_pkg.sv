// spw_pkg: types and constants shared by the SpaceWire link interface.
//
// It holds the controller state encoding, the character codes and the default timing
// constants. The state order follows the numbering used by the link's properties:
// ErrorReset = 0, ErrorWait = 1, Ready = 2, Started = 3, Connecting = 4, Run = 5.
// ErrAnalysis_DataSave (S6) is the extra seventh state. The character bit patterns are
// the usual SpaceWire ones: a parity bit, a control flag, then two control bits or eight
// data bits, least significant bit first. The clock frequency, the bit rate and the credit
// limits are this design's own choices, because the document gives none of them.
package spw_pkg;

  typedef enum logic [2:0] {
    ST_ERROR_RESET  = 3'd0,
    ST_ERROR_WAIT   = 3'd1,
    ST_READY        = 3'd2,
    ST_STARTED      = 3'd3,
    ST_CONNECTING   = 3'd4,
    ST_RUN          = 3'd5,
    ST_ERR_ANALYSIS = 3'd6
  } link_state_t;

  // Two control bits that follow the control flag, in transmission order {first, second}.
  localparam logic [1:0] CTRL_FCT = 2'b00;
  localparam logic [1:0] CTRL_EOP = 2'b01;
  localparam logic [1:0] CTRL_EEP = 2'b10;
  localparam logic [1:0] CTRL_ESC = 2'b11;

  // Host N-Char word: bit 8 is the control flag; with the flag set, bit 0 picks EEP (1) or EOP (0).
  localparam int unsigned NCHAR_W = 9;

  // What TX_Controller hands TX_Register to send next.
  typedef enum logic [1:0] {
    CH_NULL  = 2'd0,
    CH_FCT   = 2'd1,
    CH_NCHAR = 2'd2,
    CH_TIME  = 2'd3
  } tx_char_t;

  // Default timing, in cycles of an assumed 100 MHz system clock.
  localparam int unsigned T6U4_CYCLES   = 640;    // 6.4 us 
  localparam int unsigned T12U8_CYCLES  = 1280;   // 12.8 us 
  localparam int unsigned DEF_DISC_CYCLES = 85;     // 850 ns disconnect timeout
  localparam int unsigned TX_DIVISOR    = 10;     // 10 Mb/s from 100 MHz

  // Flow control: one FCT grants eight N-Chars; at most seven FCTs outstanding.
  localparam int unsigned DEF_FCT_CREDIT = 8;
  localparam int unsigned DEF_MAX_CREDIT = 56;

endpackage
