// spw_tx_register: TX_Register of the transmitter, the DS-encoding serialiser.
//
// On `provide` it builds the bit string of the chosen character and sends one bit per
// TX_Clockenable, first bit first. DataOut carries the bit. StrobeOut toggles whenever
// DataOut keeps its value, so exactly one of the two lines changes per bit: the data-strobe
// rule. Character formats, bit 0 first:
//   FCT/EOP/EEP  P 1 c1 c0                       4 bits
//   ESC          P 1 1 1
//   NULL         ESC followed by FCT              8 bits
//   data         P 0 d0 .. d7                    10 bits
//   Time-Code    ESC followed by data {F1 F0 T5..T0}  14 bits
// P is odd parity over the previous character's data or control bits, P itself and the
// control flag. These formats are the SpaceWire ones; the document names the character
// types but not their bits. The first character after TX_Reset has even previous parity.
// While TX_Reset is high, DataOut and StrobeOut are 0, as the document's properties 1-8
// require. FirstNULL_gone rises when the first NULL is loaded. NCharOnTrip is high while
// an N-Char is being shifted out.
module spw_tx_register
  import spw_pkg::*;
(
  input  logic               clk,
  input  logic               rst,              // TX_Reset
  input  logic               tx_clk_en,        // TX_Clockenable
  input  logic               provide,          // Provide
  input  tx_char_t           sel,
  input  logic [NCHAR_W-1:0] cargo,            // TX_Cargo with control flag
  input  logic [5:0]         time_val,         // Time_Out
  input  logic [1:0]         time_flags,       // TimeControlFlag_Out
  output logic               need,             // no bits left: ready for the next character
  output logic               d_out,            // DataOut
  output logic               s_out,            // StrobeOut
  output logic               first_null_gone,  // FirstNULL_gone
  output logic               nchar_on_trip     // NCharOnTrip
);
  logic [13:0] shreg;
  logic [3:0]  left;
  logic        prev_par;   // XOR of the previous character's data/control bits

  logic [13:0] vec;
  logic [3:0]  len;
  logic        par_nx;

  // Build the character to be loaded. P = 1 ^ flag ^ previous parity.
  logic       p_ctrl, p_data;
  logic [1:0] eop_eep;
  logic [7:0] tc;
  assign p_ctrl  = prev_par;          // control flag 1
  assign p_data  = ~prev_par;         // control flag 0
  assign eop_eep = cargo[0] ? CTRL_EEP : CTRL_EOP;
  assign tc      = {time_flags, time_val};

  always_comb begin
    vec    = '0;
    len    = 4'd0;
    par_nx = prev_par;
    unique case (sel)
      CH_FCT: begin
        vec    = {10'b0, CTRL_FCT[0], CTRL_FCT[1], 1'b1, p_ctrl};
        len    = 4'd4;
        par_nx = ^CTRL_FCT;
      end
      CH_NCHAR: begin
        if (cargo[8]) begin
          vec    = {10'b0, eop_eep[0], eop_eep[1], 1'b1, p_ctrl};
          len    = 4'd4;
          par_nx = ^eop_eep;
        end else begin
          vec    = {4'b0, cargo[7:0], 1'b0, p_data};
          len    = 4'd10;
          par_nx = ^cargo[7:0];
        end
      end
      CH_TIME: begin
        // ESC, then a data character whose parity covers the ESC's two 1 bits.
        vec    = {tc, 1'b0, ~(^CTRL_ESC), CTRL_ESC[0], CTRL_ESC[1], 1'b1, p_ctrl};
        len    = 4'd14;
        par_nx = ^tc;
      end
      default: begin // CH_NULL: ESC then FCT
        vec    = {6'b0, CTRL_FCT[0], CTRL_FCT[1], 1'b1, ^CTRL_ESC,
                  CTRL_ESC[0], CTRL_ESC[1], 1'b1, p_ctrl};
        len    = 4'd8;
        par_nx = ^CTRL_FCT;
      end
    endcase
  end

  assign need = (left == 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg           <= '0;
      left            <= '0;
      prev_par        <= 1'b0;
      d_out           <= 1'b0;
      s_out           <= 1'b0;
      first_null_gone <= 1'b0;
      nchar_on_trip   <= 1'b0;
    end else if (tx_clk_en) begin
      if (need) begin
        if (provide) begin
          d_out         <= vec[0];
          s_out         <= (vec[0] == d_out) ? ~s_out : s_out;
          shreg         <= vec >> 1;
          left          <= len - 4'd1;
          prev_par      <= par_nx;
          nchar_on_trip <= (sel == CH_NCHAR);
          if (sel == CH_NULL) first_null_gone <= 1'b1;
        end else begin
          nchar_on_trip <= 1'b0;
        end
      end else begin
        d_out <= shreg[0];
        s_out <= (shreg[0] == d_out) ? ~s_out : s_out;
        shreg <= shreg >> 1;
        left  <= left - 4'd1;
      end
    end
  end
endmodule
