// tb_spw_receiver: drives Din/Sin from a behavioural data-strobe encoder written
// independently of the transmitter. The character formats: parity, flag, then 2
// control bits or 8 data bits LSB first; odd parity over the previous character's
// data/control bits, P and the flag. The testbench checks:
//  - nothing is reported before the first NULL, even with leading junk bits;
//  - gotNULL, FCTs, data bytes, EOP, EEP and Time-Codes, with their values;
//  - a parity error, an escape error (ESC ESC) and a disconnect error, each after an
//    RX_Reset. The disconnect must come 85 cycles (850 ns) after the last edge, to
//    within the synchroniser delay.
module tb_spw_receiver;
  import spw_pkg::*;
  localparam int BIT = 10;   // system clocks per bit
  logic clk = 0, rxr = 1, d = 0, s = 0;
  logic gnull, gfct, gnchar, gtc, bw, tick, perr, eerr, derr, rxerr;
  logic [8:0] rdata;
  logic [5:0] tout;
  logic [1:0] fout;
  int checks = 0, failures = 0;
  logic prev_par = 0;
  always #5 clk = ~clk;

  spw_receiver dut (.clk(clk), .rx_reset(rxr), .d_in(d), .s_in(s), .got_null(gnull),
    .got_fct(gfct), .got_nchar(gnchar), .got_timecode(gtc), .rx_data(rdata),
    .buffer_write(bw), .time_out(tout), .ctrl_flags_out(fout), .tick_out(tick),
    .parity_err(perr), .escape_err(eerr), .disc_err(derr), .rx_err(rxerr));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Event log from the receiver, one entry per pulse.
  int n_fct = 0, n_tc = 0, n_perr = 0, n_eerr = 0, n_derr = 0, derr_cycle = 0, cyc = 0;
  logic [8:0] rx_q[$];
  logic [7:0] tc_q[$];
  always @(posedge clk) begin
    cyc++;
    if (cyc > 2) begin  // outputs are random until the first reset edge
    if (gfct) n_fct++;
    if (bw) rx_q.push_back(rdata);
    if (tick) tc_q.push_back({fout, tout});
    if (perr) n_perr++;
    if (eerr) n_eerr++;
    if (derr) begin n_derr++; derr_cycle = cyc; end
    end
  end

  int last_edge_cycle = 0;
  task automatic send_bit(input logic b);
    if (b == d) s = ~s; else d = b;
    last_edge_cycle = cyc;
    repeat (BIT) @(posedge clk);
  endtask

  task automatic send_ctrl(input logic [1:0] c, input logic bad_parity = 0);
    logic p;
    p = prev_par;                        // odd: prev ^ p ^ flag(1) = 1
    send_bit(p ^ bad_parity); send_bit(1'b1); send_bit(c[1]); send_bit(c[0]);
    prev_par = c[1] ^ c[0];
  endtask

  task automatic send_data(input logic [7:0] v);
    logic p;
    p = ~prev_par;                       // odd: prev ^ p ^ flag(0) = 1
    send_bit(p); send_bit(1'b0);
    for (int i = 0; i < 8; i++) send_bit(v[i]);
    prev_par = ^v;
  endtask

  task automatic send_null(); send_ctrl(2'b11); send_ctrl(2'b00); endtask
  task automatic send_tc(input logic [7:0] v); send_ctrl(2'b11); send_data(v); endtask

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic do_reset();
    rxr = 1; d = 0; s = 0; prev_par = 0;
    repeat (5) @(posedge clk);
    rxr = 0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    logic [8:0] exp_q[$];
    logic [7:0] v;
    do_reset();
    // Junk bits and an FCT before the first NULL are ignored.
    send_bit(1); send_bit(0); send_bit(1);
    send_ctrl(2'b00);
    chk(!gnull && n_fct == 0 && rx_q.size() == 0, $sformatf("ignored before first NULL %b %0d %0d", gnull, n_fct, rx_q.size()));
    send_null();
    repeat (4) @(posedge clk);
    chk(gnull, "gotNULL after first NULL");
    // Traffic.
    send_null();
    send_ctrl(2'b00); send_ctrl(2'b00);
    for (int i = 0; i < 12; i++) begin
      v = 8'($urandom);
      send_data(v);
      exp_q.push_back({1'b0, v});
      if (i == 5) begin send_ctrl(2'b01); exp_q.push_back(9'h100); end
      if (i == 8) begin send_null(); send_tc(8'hA5); end
    end
    send_ctrl(2'b10); exp_q.push_back(9'h101);
    send_tc(8'h3C);
    send_null();
    repeat (6) @(posedge clk);
    chk(n_fct == 2, $sformatf("two FCTs (%0d)", n_fct));
    chk(rx_q.size() == exp_q.size(), $sformatf("N-Char count %0d vs %0d", rx_q.size(), exp_q.size()));
    foreach (exp_q[i]) if (i < rx_q.size())
      chk(rx_q[i] == exp_q[i], $sformatf("N-Char %0d: %h vs %h", i, rx_q[i], exp_q[i]));
    chk(tc_q.size() == 2 && tc_q[0] == 8'hA5 && tc_q[1] == 8'h3C, "Time-Codes");
    chk(n_perr == 0 && n_eerr == 0 && n_derr == 0, "no errors on clean traffic");
    // Parity error.
    do_reset(); rx_q.delete();
    send_null(); send_data(8'h55); send_ctrl(2'b00, 1'b1); send_data(8'h66);
    repeat (6) @(posedge clk);
    chk(n_perr == 1, "parity error reported");
    chk(rx_q.size() == 1, "decoding stops after parity error");
    // Escape error.
    do_reset();
    send_null(); send_ctrl(2'b11); send_ctrl(2'b11);
    repeat (6) @(posedge clk);
    chk(n_eerr == 1, "escape error reported");
    // Disconnect.
    do_reset();
    send_null(); send_null();
    repeat (200) @(posedge clk);
    chk(n_derr == 1, "disconnect reported once");
    chk(derr_cycle - last_edge_cycle >= 85 && derr_cycle - last_edge_cycle <= 85 + 5,
        $sformatf("disconnect after %0d cycles", derr_cycle - last_edge_cycle));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
