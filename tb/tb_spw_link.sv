// tb_spw_link: two complete link interfaces, A and B, wired back to back at their
// default parameters (100 MHz clock, 10 Mb/s, 6.4 us / 12.8 us, 850 ns disconnect).
//
// A starts with LINK START. B uses AUTOSTART, so it waits for A's NULLs. The test runs
// these phases and counts each mechanism, failing any that never happens:
//   init        both links go ErrorReset -> ... -> Run
//   traffic     random bytes, EOP and EEP in both directions, checked in order
//   time-code   Tick_IN at A arrives at B as TICK_OUT with the same value
//   stall       B's host withholds BUFFER_READY: A runs out of credit and stalls,
//               then resumes when B is ready again
//   disconnect  the A->B wires freeze: B reports a disconnect error, both links pass
//               through ErrAnalysis_DataSave and reconnect
//   corruption  one bit on the A->B wire is inverted: B reports a parity/escape error
//   disable     LINK DISABLE at A in Run: A goes through ErrAnalysis_DataSave and
//               stays out of Run until enabled again
// It also checks the cycle counts: ErrorReset lasts 640 cycles (6.4 us) and ErrorWait
// 1280 cycles (12.8 us), and A sends one bit every 10 cycles (10 Mb/s) in Run.
// Throughout, it checks that a link holds both output lines low while its transmitter
// is reset (ErrorReset, ErrorWait, Ready, ErrAnalysis_DataSave), and that at every
// bit exactly one line changes (DS rule). ErrAnalysis_DataSave must wait for the host
// to read the error record before it leaves.
module tb_spw_link;
  import spw_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  // Host and line signals of the two links.
  logic       a_start = 0, a_dis = 0, b_start = 0, b_dis = 0, b_auto = 1;
  logic       a_wr = 0, b_wr = 0, a_rdy, b_rdy;
  logic [8:0] a_wd = 0, b_wd = 0, a_rd, b_rd;
  logic       a_tick = 0, b_tick = 0, a_tko, b_tko;
  logic [5:0] a_tin = 0, a_to, b_to;
  logic [1:0] a_fin = 0, a_fo, b_fo;
  logic       a_bready = 1, b_bready = 1, a_bw, b_bw;
  logic       a_erd = 0, b_erd = 0;
  logic [3:0] a_es, b_es;
  logic [7:0] a_ec, b_ec;
  logic       a_d, a_s, b_d, b_s, a_rxc, b_rxc;
  link_state_t a_st, b_st;
  logic       a_fng, a_ntrip, b_fng, b_ntrip;
  logic [5:0] a_txc, a_rxcr, b_txc, b_rxcr;

  // Wire faults on A->B.
  logic freeze_ab = 0, flip_ab = 0;
  logic ab_d, ab_s, fz_d, fz_s;
  always_ff @(posedge clk) if (!freeze_ab) begin fz_d <= a_d; fz_s <= a_s; end
  assign ab_d = freeze_ab ? fz_d : (a_d ^ flip_ab);
  assign ab_s = freeze_ab ? fz_s : a_s;

  spw_link u_a (.clk(clk), .rst(rst), .link_start(a_start), .link_disable(a_dis),
    .autostart(1'b0), .tx_write(a_wr), .tx_data(a_wd), .tx_ready(a_rdy), .tick_in(a_tick),
    .time_in(a_tin), .ctrl_flags_in(a_fin), .buffer_ready(a_bready), .buffer_write(a_bw),
    .rx_data(a_rd), .tick_out(a_tko), .time_out(a_to), .ctrl_flags_out(a_fo),
    .fifo_empty(1'b1), .err_read(a_erd), .err_status(a_es), .err_count(a_ec),
    .d_in(b_d), .s_in(b_s), .d_out(a_d), .s_out(a_s), .rx_clock(a_rxc), .state(a_st),
    .first_null_gone(a_fng), .nchar_on_trip(a_ntrip), .tx_credit(a_txc), .rx_credit(a_rxcr));

  spw_link u_b (.clk(clk), .rst(rst), .link_start(b_start), .link_disable(b_dis),
    .autostart(b_auto), .tx_write(b_wr), .tx_data(b_wd), .tx_ready(b_rdy), .tick_in(b_tick),
    .time_in(6'd0), .ctrl_flags_in(2'd0), .buffer_ready(b_bready), .buffer_write(b_bw),
    .rx_data(b_rd), .tick_out(b_tko), .time_out(b_to), .ctrl_flags_out(b_fo),
    .fifo_empty(1'b1), .err_read(b_erd), .err_status(b_es), .err_count(b_ec),
    .d_in(ab_d), .s_in(ab_s), .d_out(b_d), .s_out(b_s), .rx_clock(b_rxc), .state(b_st),
    .first_null_gone(b_fng), .nchar_on_trip(b_ntrip), .tx_credit(b_txc), .rx_credit(b_rxcr));

  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_run_a = 0, n_run_b = 0, n_stall = 0, n_disc = 0, n_corrupt = 0, n_disable = 0;
  int n_errwait = 0, n_tc = 0, n_rx_ab = 0, n_rx_ba = 0, n_autostart = 0;

  // Line rules, for both links.
  logic pa_d = 0, pa_s = 0, pb_d = 0, pb_s = 0;
  link_state_t pa_st = ST_ERROR_RESET, pb_st = ST_ERROR_RESET;
  int rule_checks = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (pa_st inside {ST_ERROR_RESET, ST_ERROR_WAIT, ST_READY, ST_ERR_ANALYSIS} &&
          a_st inside {ST_ERROR_RESET, ST_ERROR_WAIT, ST_READY, ST_ERR_ANALYSIS}) begin
        rule_checks++; checks++;
        if (a_d || a_s) begin failures++; $display("FAIL A lines high in state %0d", a_st); end
      end
      if (pb_st inside {ST_ERROR_RESET, ST_ERROR_WAIT, ST_READY, ST_ERR_ANALYSIS} &&
          b_st inside {ST_ERROR_RESET, ST_ERROR_WAIT, ST_READY, ST_ERR_ANALYSIS}) begin
        rule_checks++; checks++;
        if (b_d || b_s) begin failures++; $display("FAIL B lines high in state %0d", b_st); end
      end
      if ((a_d != pa_d) && (a_s != pa_s) && !(a_d == 0 && a_s == 0)) begin
        checks++; failures++; $display("FAIL A changed both lines at once");
      end
      if ((b_d != pb_d) && (b_s != pb_s) && !(b_d == 0 && b_s == 0)) begin
        checks++; failures++; $display("FAIL B changed both lines at once");
      end
      if (a_st == ST_RUN && pa_st != ST_RUN) n_run_a++;
      if (b_st == ST_RUN && pb_st != ST_RUN) n_run_b++;
      if (b_st == ST_STARTED && pb_st == ST_READY && !b_start) n_autostart++;
      if (a_st == ST_ERR_ANALYSIS && pa_st == ST_ERR_ANALYSIS && a_es != 0) n_errwait++;
      if (b_st == ST_ERR_ANALYSIS && pb_st == ST_ERR_ANALYSIS && b_es != 0) n_errwait++;
    end
    pa_d <= a_d; pa_s <= a_s; pb_d <= b_d; pb_s <= b_s; pa_st <= a_st; pb_st <= b_st;
  end

  // Cycle counts: ErrorReset must last 6.4 us (640 cycles) and ErrorWait 12.8 us
  // (1280 cycles) when entered by a transition; in Run, A sends one bit every 10 cycles
  // (10 Mb/s).
  int cyc = 0, a_entry = 0, a_last_edge = -1, n_t64 = 0, n_t128 = 0, n_bitper = 0;
  bit a_entered_by_transition = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst) a_entered_by_transition = 0;
    else if (a_st != pa_st) begin
      if (a_entered_by_transition && pa_st == ST_ERROR_RESET && a_st == ST_ERROR_WAIT) begin
        checks++; n_t64++;
        if (cyc - a_entry != 640) begin failures++; $display("FAIL ErrorReset lasted %0d cycles", cyc - a_entry); end
      end
      if (a_entered_by_transition && pa_st == ST_ERROR_WAIT && a_st == ST_READY) begin
        checks++; n_t128++;
        if (cyc - a_entry != 1280) begin failures++; $display("FAIL ErrorWait lasted %0d cycles", cyc - a_entry); end
      end
      a_entry = cyc;
      a_entered_by_transition = 1;
    end
    if (a_st == ST_RUN && pa_st == ST_RUN && (a_d != pa_d || a_s != pa_s)) begin
      if (a_last_edge >= 0) begin
        checks++; n_bitper++;
        if (cyc - a_last_edge != 10) begin failures++; $display("FAIL bit period %0d cycles", cyc - a_last_edge); end
      end
      a_last_edge = cyc;
    end else if (a_st != ST_RUN) a_last_edge = -1;
  end

  // Host error handling: read the error record some time after it appears.
  int a_age = 0, b_age = 0;
  logic [3:0] a_seen = 0, b_seen = 0;
  always @(posedge clk) begin
    a_erd <= 0; b_erd <= 0;
    a_age <= (a_es != 0) ? a_age + 1 : 0;
    b_age <= (b_es != 0) ? b_age + 1 : 0;
    if (a_age == 40) begin a_erd <= 1; a_seen <= a_seen | a_es; end
    if (b_age == 40) begin b_erd <= 1; b_seen <= b_seen | b_es; end
  end

  // Receive logs.
  logic [8:0] got_b[$], got_a[$];
  logic [7:0] tc_b[$];
  always @(posedge clk) begin
    if (!rst && b_bw) got_b.push_back(b_rd);
    if (!rst && a_bw) got_a.push_back(a_rd);
    if (!rst && b_tko) tc_b.push_back({b_fo, b_to});
  end

  // Host writers.
  logic [8:0] exp_b[$], exp_a[$];
  task automatic write_a(input logic [8:0] v);
    @(negedge clk);
    while (!a_rdy) @(negedge clk);
    a_wr <= 1; a_wd <= v; @(negedge clk); a_wr <= 0;
    exp_b.push_back(v);
  endtask
  task automatic write_b(input logic [8:0] v);
    @(negedge clk);
    while (!b_rdy) @(negedge clk);
    b_wr <= 1; b_wd <= v; @(negedge clk); b_wr <= 0;
    exp_a.push_back(v);
  endtask

  function automatic logic [8:0] rand_nchar();
    int r;
    r = $urandom_range(0, 19);
    if (r == 0) return 9'h100;
    if (r == 1) return 9'h101;
    return {1'b0, 8'($urandom)};
  endfunction

  task automatic wait_run(input string m);
    int t;
    t = 0;
    while (!(a_st == ST_RUN && b_st == ST_RUN) && t < 200_000) begin @(posedge clk); t++; end
    chk(a_st == ST_RUN && b_st == ST_RUN, {"both links in Run: ", m});
  endtask

  // Send n characters each way and check them on arrival.
  task automatic traffic(input int n, input string m);
    int t;
    got_a.delete(); got_b.delete(); exp_a.delete(); exp_b.delete();
    fork
      for (int i = 0; i < n; i++) write_a(rand_nchar());
      for (int i = 0; i < n; i++) write_b(rand_nchar());
    join
    t = 0;
    while ((got_b.size() < n || got_a.size() < n) && t < 100_000) begin @(posedge clk); t++; end
    chk(got_b.size() == n && got_a.size() == n,
        $sformatf("%s: received %0d/%0d and %0d/%0d", m, got_b.size(), n, got_a.size(), n));
    foreach (exp_b[i]) if (i < got_b.size()) begin
      chk(got_b[i] == exp_b[i], $sformatf("%s: A->B char %0d %h vs %h", m, i, got_b[i], exp_b[i]));
      n_rx_ab++;
    end
    foreach (exp_a[i]) if (i < got_a.size()) begin
      chk(got_a[i] == exp_a[i], $sformatf("%s: B->A char %0d %h vs %h", m, i, got_a[i], exp_a[i]));
      n_rx_ba++;
    end
  endtask

  task automatic wait_state(ref link_state_t st, input link_state_t want, input int limit, output bit ok);
    int t;
    t = 0;
    while (st != want && t < limit) begin @(posedge clk); t++; end
    ok = (st == want);
  endtask

  initial begin
    int t, stall;
    bit ok;
    repeat (5) @(posedge clk);
    rst <= 0;
    a_start <= 1;

    // init
    wait_run("init");
    chk(n_autostart >= 1, "B started by autostart");
    traffic(40, "traffic");

    // time-code
    tc_b.delete();
    a_tin <= 6'h15; a_fin <= 2'b01; a_tick <= 1; @(posedge clk); a_tick <= 0;
    repeat (400) @(posedge clk);
    chk(tc_b.size() == 1 && tc_b[0] == {2'b01, 6'h15}, "time-code delivered");
    if (tc_b.size() == 1) n_tc++;

    // stall: B withholds BUFFER_READY, A runs out of credit.
    b_bready <= 0;
    got_b.delete(); exp_b.delete();
    fork
      for (int i = 0; i < 80; i++) write_a({1'b0, 8'(i)});
    join_none
    stall = 0;
    for (t = 0; t < 20_000; t++) begin
      @(posedge clk);
      if (a_txc == 0 && !a_rdy && a_st == ST_RUN) stall++;
    end
    chk(stall > 1000, $sformatf("A stalled without credit (%0d cycles)", stall));
    chk(got_b.size() <= 56, $sformatf("no more than 56 N-Chars without new FCTs (%0d)", got_b.size()));
    if (stall > 1000) n_stall++;
    b_bready <= 1;
    t = 0;
    while (got_b.size() < 80 && t < 100_000) begin @(posedge clk); t++; end
    chk(got_b.size() == 80, $sformatf("stalled data completes (%0d)", got_b.size()));
    foreach (got_b[i]) chk(got_b[i] == {1'b0, 8'(i)}, "stalled data order");

    // disconnect: freeze the A->B wires.
    b_seen = 0;
    freeze_ab <= 1;
    wait_state(b_st, ST_ERR_ANALYSIS, 10_000, ok);
    chk(ok, "B enters ErrAnalysis_DataSave on disconnect");
    freeze_ab <= 0;
    wait_state(b_st, ST_ERROR_RESET, 10_000, ok);
    chk(b_seen[0], "B recorded a disconnect error");
    if (b_seen[0]) n_disc++;
    wait_run("after disconnect");
    traffic(30, "traffic after disconnect");

    // corruption: invert one bit period of A's data line, aligned to A's bit edges.
    b_seen = 0;
    repeat (37) @(posedge clk);
    @(posedge clk iff (a_d != pa_d || a_s != pa_s));
    flip_ab <= 1;
    @(posedge clk iff (a_d != pa_d || a_s != pa_s));
    flip_ab <= 0;
    t = 0;
    while (b_seen == 0 && t < 20_000) begin @(posedge clk); t++; end
    chk(b_seen[1] || b_seen[2], $sformatf("B recorded a parity/escape error (%b)", b_seen));
    if (b_seen[1] || b_seen[2]) n_corrupt++;
    wait_run("after corruption");
    traffic(30, "traffic after corruption");

    // disable A.
    a_dis <= 1;
    wait_state(a_st, ST_ERR_ANALYSIS, 1000, ok);
    chk(ok, "A enters ErrAnalysis_DataSave on LINK DISABLE");
    repeat (20_000) @(posedge clk);
    chk(a_st != ST_RUN && a_st != ST_STARTED, "A stays down while disabled");
    if (ok) n_disable++;
    a_dis <= 0;
    wait_run("after re-enable");
    traffic(20, "traffic after re-enable");

    chk(n_run_a >= 4 && n_run_b >= 4, $sformatf("Run entries A=%0d B=%0d", n_run_a, n_run_b));
    chk(n_errwait > 0, "ErrAnalysis_DataSave waited for the error read");
    chk(rule_checks > 1000, "line rule checked");
    chk(n_t64 >= 3 && n_t128 >= 3, $sformatf("timeouts measured (%0d, %0d)", n_t64, n_t128));
    chk(n_bitper > 1000, "bit period measured");
    $display("INFO runs A=%0d B=%0d autostart=%0d chars A->B=%0d B->A=%0d timecodes=%0d stalls=%0d disconnects=%0d corruptions=%0d disables=%0d errwait=%0d",
             n_run_a, n_run_b, n_autostart, n_rx_ab, n_rx_ba, n_tc, n_stall, n_disc, n_corrupt, n_disable, n_errwait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
