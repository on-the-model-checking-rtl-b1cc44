// spw_receiver: SpaceWire receiver, the data-strobe decoder.
//
// Din and Sin pass through two-flop synchronisers into the system clock domain. A
// received bit is the value of Din whenever either line has changed. The design thus
// samples the lines with the system clock. It does not clock a shift register with the
// recovered RX_CLOCK; the system clock must be a few times faster than the bit rate.
// Until its first NULL, the receiver only searches the bit stream for the NULL pattern
// (ESC followed by FCT: x1110100). That aligns it to the character boundary and sets the
// gotNULL level. After that it decodes each character:
//   parity bit, control flag, then 2 control bits or 8 data bits (LSB first).
// It reports FCTs, N-Chars (data, EOP, EEP), NULLs and Time-Codes (ESC + data). N-Chars go
// to the host on rx_data with a one-cycle buffer_write. A Time-Code drives time_out and
// ctrl_flags_out, with tick_out for one cycle. Errors are one-cycle pulses:
//   parity_err  odd parity over previous data bits, P and flag fails
//   escape_err  ESC followed by anything but FCT or a data character
//   disc_err    no bit edge for DISC_CYCLES after the first edge (850 ns by default)
// After an error the receiver stops decoding until RX_Reset. The document gives the
// receiver's function and signal names only. The character formats, the 850 ns timeout
// and the oversampling scheme are the usual SpaceWire choices and this design's own.
module spw_receiver
  import spw_pkg::*;
#(
  parameter int unsigned DISC_CYCLES = 85
) (
  input  logic               clk,
  input  logic               rx_reset,       // RX_RESET
  input  logic               d_in,           // Datain
  input  logic               s_in,           // Strobein
  output logic               got_null,       // level: first NULL received
  output logic               got_fct,        // pulse
  output logic               got_nchar,      // pulse
  output logic               got_timecode,   // pulse
  output logic [NCHAR_W-1:0] rx_data,        // RX DATA / control flag
  output logic               buffer_write,   // BUFFER WRITE
  output logic [5:0]         time_out,       // TIME_OUT
  output logic [1:0]         ctrl_flags_out, // CONTROL FLAGS OUT
  output logic               tick_out,       // TICK_OUT
  output logic               parity_err,
  output logic               escape_err,
  output logic               disc_err,
  output logic               rx_err          // any of the three errors
);
  localparam int unsigned DW = $clog2(DISC_CYCLES + 1);

  logic d_s1, d_s2, s_s1, s_s2, d_q, s_q;
  logic edge_seen, bit_v, bit_val;
  logic halted;
  logic [DW-1:0] idle_cnt;
  logic [5:0]  hist;
  logic [3:0]  bitcnt;      // bits received of the current character
  logic        is_ctrl, par_acc, prev_par, esc_pending;
  logic [7:0]  body;

  // Body bits: control characters keep {first, second}; data shifts in LSB first.
  logic       last;
  logic [7:0] nb;
  assign last = is_ctrl ? (bitcnt == 4'd3) : (bitcnt == 4'd9);
  assign nb   = is_ctrl ? {6'b0, body[0], bit_val} : {bit_val, body[7:1]};

  assign bit_v   = (d_s2 != d_q) || (s_s2 != s_q);
  assign bit_val = d_s2;

  always_ff @(posedge clk) begin
    if (rx_reset) begin
      {d_s1, d_s2, s_s1, s_s2, d_q, s_q} <= '0;
    end else begin
      d_s1 <= d_in;  d_s2 <= d_s1;  d_q <= d_s2;
      s_s1 <= s_in;  s_s2 <= s_s1;  s_q <= s_s2;
    end
  end

  always_ff @(posedge clk) begin
    if (rx_reset) begin
      edge_seen <= 1'b0;
      idle_cnt  <= '0;
      halted    <= 1'b0;
      hist      <= '0;
      bitcnt    <= '0;
      is_ctrl   <= 1'b0;
      par_acc   <= 1'b0;
      prev_par  <= 1'b0;
      esc_pending <= 1'b0;
      body      <= '0;
      got_null  <= 1'b0;
      got_fct   <= 1'b0;
      got_nchar <= 1'b0;
      got_timecode <= 1'b0;
      rx_data   <= '0;
      buffer_write <= 1'b0;
      time_out  <= '0;
      ctrl_flags_out <= '0;
      tick_out  <= 1'b0;
      parity_err <= 1'b0;
      escape_err <= 1'b0;
      disc_err  <= 1'b0;
    end else begin
      got_fct      <= 1'b0;
      got_nchar    <= 1'b0;
      got_timecode <= 1'b0;
      buffer_write <= 1'b0;
      tick_out     <= 1'b0;
      parity_err   <= 1'b0;
      escape_err   <= 1'b0;
      disc_err     <= 1'b0;

      // Disconnect detection.
      if (bit_v) begin
        edge_seen <= 1'b1;
        idle_cnt  <= '0;
      end else if (edge_seen && !halted) begin
        if (idle_cnt == DW'(DISC_CYCLES - 1)) begin
          disc_err <= 1'b1;
          halted   <= 1'b1;
        end else begin
          idle_cnt <= idle_cnt + 1'b1;
        end
      end

      if (bit_v && !halted) begin
        if (!got_null) begin
          // Search for the first NULL.
          hist <= {hist[4:0], bit_val};
          if ({hist[5:0], bit_val} == 7'b1110100) begin
            got_null    <= 1'b1;
            bitcnt      <= '0;
            prev_par    <= 1'b0;
            esc_pending <= 1'b0;
          end
        end else if (bitcnt == 4'd0) begin
          par_acc <= prev_par ^ bit_val;
          bitcnt  <= 4'd1;
        end else if (bitcnt == 4'd1) begin
          is_ctrl <= bit_val;
          bitcnt  <= 4'd2;
          if ((par_acc ^ bit_val) != 1'b1) begin
            parity_err <= 1'b1;
            halted     <= 1'b1;
          end
        end else begin
          body   <= nb;
          bitcnt <= last ? 4'd0 : bitcnt + 4'd1;
          if (last) begin
            prev_par <= ^nb;
            if (is_ctrl) begin
              if (esc_pending) begin
                esc_pending <= 1'b0;
                if (nb[1:0] != CTRL_FCT) begin  // ESC + FCT is a NULL; nothing else is allowed
                  escape_err <= 1'b1;
                  halted     <= 1'b1;
                end
              end else begin
                unique case (nb[1:0])
                  CTRL_ESC: esc_pending <= 1'b1;
                  CTRL_FCT: got_fct     <= 1'b1;
                  CTRL_EOP: begin
                    got_nchar <= 1'b1; buffer_write <= 1'b1; rx_data <= 9'h100;
                  end
                  default: begin // CTRL_EEP
                    got_nchar <= 1'b1; buffer_write <= 1'b1; rx_data <= 9'h101;
                  end
                endcase
              end
            end else if (esc_pending) begin
              esc_pending    <= 1'b0;
              got_timecode   <= 1'b1;
              tick_out       <= 1'b1;
              time_out       <= nb[5:0];
              ctrl_flags_out <= nb[7:6];
            end else begin
              got_nchar    <= 1'b1;
              buffer_write <= 1'b1;
              rx_data      <= {1'b0, nb};
            end
          end
        end
      end
    end
  end

  assign rx_err = parity_err || escape_err || disc_err;
endmodule
