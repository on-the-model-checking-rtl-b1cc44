// tb_spw_properties: the link's nine verified properties, checked in simulation on two
// links wired back to back under random traffic and random disturbances.
//
// The properties are stated over a link's DataOut, StrobeOut, RESET and controller state:
//   P1/P2  after a disconnection error, DataOut / StrobeOut become 0
//   P3/P4  in state 0 (ErrorReset) with RESET low and After6.4, DataOut / StrobeOut become 0
//   P5/P6  in state 1 (ErrorWait) with RESET low and After12.8, DataOut / StrobeOut become 0
//   P7/P8  after RESET, DataOut / StrobeOut become 0
//   P9     when an FCT is provided while in Connecting (state 4) with RESET low, each of
//          its bits changes exactly one of DataOut and StrobeOut (the DS rule), up to
//          a transmitter reset, which forces both lines to 0 as P1-P8 demand
// "Become 0" is checked as a bounded response: within 3 clock cycles. The random
// scenario repeats these disturbances between stretches of traffic: wire freezes,
// single inverted bits, LINK DISABLE pulses at either end, and system resets of either
// end. Each property must be triggered at least once; the count of triggers and
// violations is printed. Internal signals are observed through hierarchical names.
module tb_spw_properties;
  import spw_pkg::*;
  localparam int BOUND = 3;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst[2], ldis[2], wr[2], rdy[2], bready[2], bw[2], erd[2];
  logic [8:0] wd[2], rd[2];
  logic [3:0] es[2];
  logic       dout[2], sout[2], din[2], sin[2];
  link_state_t st[2];
  logic freeze = 0, flip = 0, fz_d, fz_s;

  always_ff @(posedge clk) if (!freeze) begin fz_d <= dout[0]; fz_s <= sout[0]; end
  assign din[1] = freeze ? fz_d : (dout[0] ^ flip);
  assign sin[1] = freeze ? fz_s : sout[0];
  assign din[0] = dout[1];
  assign sin[0] = sout[1];

  for (genvar i = 0; i < 2; i++) begin : g_link
    logic unused_tko, unused_rxc, unused_fng, unused_trip;
    logic [5:0] unused_to, unused_txc, unused_rxcr;
    logic [1:0] unused_fo;
    logic [7:0] unused_ec;
    spw_link u (.clk(clk), .rst(rst[i]), .link_start(i == 0), .link_disable(ldis[i]),
      .autostart(1'b1), .tx_write(wr[i]), .tx_data(wd[i]), .tx_ready(rdy[i]),
      .tick_in(1'b0), .time_in(6'd0), .ctrl_flags_in(2'd0), .buffer_ready(bready[i]),
      .buffer_write(bw[i]), .rx_data(rd[i]), .tick_out(unused_tko), .time_out(unused_to),
      .ctrl_flags_out(unused_fo), .fifo_empty(1'b1), .err_read(erd[i]), .err_status(es[i]),
      .err_count(unused_ec), .d_in(din[i]), .s_in(sin[i]), .d_out(dout[i]), .s_out(sout[i]),
      .rx_clock(unused_rxc), .state(st[i]), .first_null_gone(unused_fng),
      .nchar_on_trip(unused_trip), .tx_credit(unused_txc), .rx_credit(unused_rxcr));
  end

  logic disc_err[2], a64[2], a128[2], fct_ack[2], txen[2], txr[2];
  assign txr[0]      = g_link[0].u.tx_reset;
  assign txr[1]      = g_link[1].u.tx_reset;
  assign disc_err[0] = g_link[0].u.u_rx.disc_err;
  assign disc_err[1] = g_link[1].u.u_rx.disc_err;
  assign a64[0]      = g_link[0].u.u_timer.after_6u4;
  assign a64[1]      = g_link[1].u.u_timer.after_6u4;
  assign a128[0]     = g_link[0].u.u_timer.after_12u8;
  assign a128[1]     = g_link[1].u.u_timer.after_12u8;
  assign fct_ack[0]  = g_link[0].u.u_tx.u_ctrl.fct_ack;
  assign fct_ack[1]  = g_link[1].u.u_tx.u_ctrl.fct_ack;
  assign txen[0]     = g_link[0].u.tx_clk_en;
  assign txen[1]     = g_link[1].u.tx_clk_en;

  int checks = 0, failures = 0;
  int trig[1:9], viol[1:9];
  initial for (int p = 1; p <= 9; p++) begin trig[p] = 0; viol[p] = 0; end

  // Bounded-response monitors for P1-P8, per link and property.
  int deadline[2][1:8];
  initial for (int i = 0; i < 2; i++) for (int p = 1; p <= 8; p++) deadline[i][p] = -1;

  // P9: bits still to check after an FCT in Connecting.
  int p9_bits[2];
  int p9_cut = 0;
  logic pd[2], ps[2], pen[2];
  initial begin p9_bits[0] = 0; p9_bits[1] = 0; end

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    for (int i = 0; i < 2; i++) begin
      logic trg[1:8];
      trg[1] = disc_err[i];                                   trg[2] = trg[1];
      trg[3] = (st[i] == ST_ERROR_RESET) && !rst[i] && a64[i];  trg[4] = trg[3];
      trg[5] = (st[i] == ST_ERROR_WAIT) && !rst[i] && a128[i];  trg[6] = trg[5];
      trg[7] = rst[i];                                        trg[8] = trg[7];
      for (int p = 1; p <= 8; p++) begin
        logic line;
        line = (p % 2 == 1) ? dout[i] : sout[i];
        if (trg[p] && deadline[i][p] < 0) begin trig[p]++; deadline[i][p] = cyc + BOUND; end
        if (deadline[i][p] >= 0) begin
          if (!line) begin
            checks++; deadline[i][p] = -1;
          end else if (cyc >= deadline[i][p]) begin
            checks++; failures++; viol[p]++; deadline[i][p] = -1;
            $display("FAIL P%0d on link %0d at cycle %0d", p, i, cyc);
          end
        end
      end
      // P9: a bit goes out on the cycle after an enable; watch the next 4 after an FCT.
      // A transmitter reset during the FCT ends the window: properties 1-8 then
      // require both lines to drop to 0 together.
      if (p9_bits[i] > 0 && (txr[i] || rst[i])) begin
        p9_bits[i] = 0; p9_cut++;
      end
      if (pen[i] && p9_bits[i] > 0) begin
        checks++;
        if ((dout[i] ^ pd[i]) + (sout[i] ^ ps[i]) != 1) begin
          failures++; viol[9]++;
          $display("FAIL P9 on link %0d at cycle %0d state %0d d %b->%b s %b->%b", i, cyc, st[i], pd[i], dout[i], ps[i], sout[i]);
        end
        p9_bits[i]--;
      end
      if (fct_ack[i] && st[i] == ST_CONNECTING && !rst[i]) begin
        trig[9]++;
        p9_bits[i] = 4;
      end
      pd[i] <= dout[i]; ps[i] <= sout[i]; pen[i] <= txen[i] && !rst[i];
    end
  end

  // Hosts: random traffic, random buffer readiness, error reads after a delay.
  int age[2];
  int n_rx = 0;
  always @(negedge clk) begin
    for (int i = 0; i < 2; i++) begin
      wr[i] <= 0; erd[i] <= 0;
      if (rdy[i] && $urandom_range(0, 3) == 0) begin
        wr[i] <= 1; wd[i] <= {($urandom_range(0, 15) == 0), 8'($urandom)};
      end
      if ($urandom_range(0, 4999) == 0) bready[i] <= ~bready[i];
      age[i] = (es[i] != 0) ? age[i] + 1 : 0;
      if (age[i] == 30) erd[i] <= 1;
      if (bw[i]) n_rx++;
    end
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ev;
    int n_ev[6];
    for (int i = 0; i < 2; i++) begin
      rst[i] = 1; ldis[i] = 0; bready[i] = 1; wr[i] = 0; wd[i] = 0; erd[i] = 0; age[i] = 0;
      pd[i] = 0; ps[i] = 0; pen[i] = 0;
    end
    foreach (n_ev[k]) n_ev[k] = 0;
    repeat (5) @(posedge clk);
    rst[0] <= 0; rst[1] <= 0;
    for (int n = 0; n < 40; n++) begin
      repeat ($urandom_range(3000, 12000)) @(posedge clk);
      ev = $urandom_range(0, 5);
      n_ev[ev]++;
      case (ev)
        0: begin freeze <= 1; repeat ($urandom_range(100, 2000)) @(posedge clk); freeze <= 0; end
        1: begin
             @(posedge clk iff (dout[0] != pd[0] || sout[0] != ps[0]));
             flip <= 1;
             @(posedge clk iff (dout[0] != pd[0] || sout[0] != ps[0]));
             flip <= 0;
           end
        2: begin ldis[0] <= 1; repeat ($urandom_range(10, 3000)) @(posedge clk); ldis[0] <= 0; end
        3: begin ldis[1] <= 1; repeat ($urandom_range(10, 3000)) @(posedge clk); ldis[1] <= 0; end
        4: begin rst[0] <= 1; repeat ($urandom_range(1, 50)) @(posedge clk); rst[0] <= 0; end
        default: begin rst[1] <= 1; repeat ($urandom_range(1, 50)) @(posedge clk); rst[1] <= 0; end
      endcase
    end
    repeat (20000) @(posedge clk);
    for (int p = 1; p <= 9; p++) begin
      checks++;
      if (trig[p] == 0) begin failures++; $display("FAIL property %0d never triggered", p); end
      $display("INFO P%0d triggered %0d violated %0d", p, trig[p], viol[p]);
    end
    checks++;
    if (n_rx < 100) begin failures++; $display("FAIL too little traffic (%0d)", n_rx); end
    $display("INFO P9 windows ended by a transmitter reset: %0d", p9_cut);
    $display("INFO events freeze=%0d flip=%0d disA=%0d disB=%0d rstA=%0d rstB=%0d received=%0d",
             n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4], n_ev[5], n_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
