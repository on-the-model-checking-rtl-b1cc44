// tb_spw_transmitter: the transmitter driven by the environment state machine model.
//
// The model steps S0..S6 and the testbench plays the rest of the link: the credit count,
// FCT requests, the host writing N-Chars and Tick_IN. A monitor watches DataOut and
// StrobeOut and checks:
//  - both lines stay low while TX_Reset is high (properties 1-8 of the link);
//  - at every bit exactly one of the two lines changes (the DS rule, property 9);
//  - one bit goes out per TX_Clockenable, with none skipped (the bit rate).
// The bit stream is decoded independently, with a parity check on every character.
// The decoded characters must be: NULLs first, FCTs only from Connecting on and only
// after a NULL, N-Chars only in Run and in the written order, no more N-Chars than the
// credit given, and the Time-Code with the value latched at the tick.
module tb_spw_transmitter;
  import spw_pkg::*;
  logic clk = 0, rst = 1, advance = 0;
  logic [2:0] st;
  logic txr, snull, sfct, sall;
  logic en = 0, eight_more = 0, tick = 0, wr = 0;
  logic [5:0] tin = 0;
  logic [1:0] fin = 0;
  logic [8:0] wdata = 0;
  logic rdy, d, s, fng, ntrip, nsent;
  int credit = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  spw_env_fsm env (.clk(clk), .rst(rst), .advance(advance), .state(st), .tx_reset(txr),
    .send_null(snull), .send_fct(sfct), .send_all(sall));

  spw_transmitter dut (.clk(clk), .tx_reset(txr), .tx_clk_en(en), .send_null(snull),
    .send_fct(sfct), .send_all(sall), .eight_more(eight_more), .no_credit(credit == 0),
    .tick_in(tick), .time_in(tin), .ctrl_flags_in(fin), .tx_write(wr), .tx_data(wdata),
    .tx_ready(rdy), .d_out(d), .s_out(s), .first_null_gone(fng), .nchar_on_trip(ntrip),
    .nchar_sent(nsent));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bit clock enable: one cycle in four.
  int ecnt = 0;
  always @(posedge clk) begin
    ecnt <= (ecnt == 3) ? 0 : ecnt + 1;
    en   <= (ecnt == 3);
  end

  always @(posedge clk) if (nsent) credit <= credit - 1;

  // Line monitor.
  logic pd = 0, ps = 0, pen = 0, ptxr = 1;
  logic bits[$];
  int bit_state[$];     // controller state when each bit went out
  int n_rule = 0, n_rate = 0, n_zero = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (ptxr) begin
        checks++; n_zero++;
        if (d || s) begin failures++; $display("FAIL lines not low under TX_Reset"); end
      end else begin
        if (pen) begin
          checks++; n_rate++;
          if ((d ^ pd) + (s ^ ps) != 1) begin
            failures++; $display("FAIL DS rule: d %b->%b s %b->%b", pd, d, ps, s);
          end
          bits.push_back(d);
          bit_state.push_back(int'(st));
        end else if (d != pd || s != ps) begin
          checks++; failures++; $display("FAIL line changed without a clock enable");
        end
      end
    end
    pd <= d; ps <= s; pen <= en && !txr; ptxr <= txr;
  end

  // Decoder: returns tokens "NULL", "FCT", "EOP", "EEP", "ESC?", "D" + byte, "T" + byte.
  typedef struct { string kind; logic [7:0] v; int at_state; } tok_t;
  tok_t toks[$];
  int par_errs = 0;
  task automatic decode();
    int i; logic prev; logic p, f; logic [7:0] v; logic esc; int st0;
    i = 0; prev = 0; esc = 0;
    while (i + 4 <= bits.size()) begin
      st0 = bit_state[i];
      p = bits[i]; f = bits[i+1];
      if ((prev ^ p ^ f) != 1'b1) par_errs++;
      if (f) begin
        logic [1:0] c;
        c = {bits[i+2], bits[i+3]};
        i += 4; prev = c[1] ^ c[0];
        if (esc) begin
          esc = 0;
          toks.push_back('{c == 2'b00 ? "NULL" : "ESC?", 0, st0});
        end else if (c == 2'b11) esc = 1;
        else toks.push_back('{c == 2'b00 ? "FCT" : c == 2'b01 ? "EOP" : "EEP", 0, st0});
      end else begin
        if (i + 10 > bits.size()) break;
        for (int k = 0; k < 8; k++) v[k] = bits[i+2+k];
        i += 10; prev = ^v;
        toks.push_back('{esc ? "T" : "D", v, st0});
        esc = 0;
      end
    end
  endtask

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic step(); advance <= 1; @(posedge clk); advance <= 0; @(posedge clk); endtask

  logic [8:0] sent_q[$];
  task automatic host_write(input logic [8:0] v);
    while (!rdy) @(posedge clk);
    wr <= 1; wdata <= v; @(posedge clk); wr <= 0; @(posedge clk);
    sent_q.push_back(v);
  endtask

  initial begin
    int nf, nd, nt, nn, first_fct, nstall;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (40) @(posedge clk);
    step(); repeat (40) @(posedge clk);    // S1
    step(); repeat (40) @(posedge clk);    // S2
    step();                                // S3 Started: NULLs
    eight_more <= 1; @(posedge clk); @(posedge clk); eight_more <= 0;   // two FCT requests
    host_write(9'h011);                    // written early, must wait for Run
    repeat (300) @(posedge clk);
    step();                                // S4 Connecting: FCTs and NULLs
    repeat (400) @(posedge clk);
    credit = 8;
    step();                                // S5 Run
    fork
      for (int k = 0; k < 10; k++) host_write({1'b0, 8'(8'h20 + k)});
    join_none
    // Credit ran out after eight N-Chars: the rest must wait.
    nstall = 0;
    wait (credit == 0);
    repeat (300) @(posedge clk) if (credit == 0 && !rdy) nstall++;
    chk(nstall > 200, $sformatf("transmitter stalls without credit (%0d)", nstall));
    tin <= 6'h2B; fin <= 2'b10; tick <= 1; @(posedge clk); tick <= 0; tin <= 0; fin <= 0;
    repeat (200) @(posedge clk);
    credit = credit + 8;
    wait (sent_q.size() == 11);
    host_write(9'h100);                    // EOP
    host_write(9'h101);                    // EEP
    repeat (600) @(posedge clk);
    step();                                // S6: reset again
    repeat (50) @(posedge clk);

    decode();
    nf = 0; nd = 0; nt = 0; nn = 0; first_fct = -1;
    foreach (toks[k]) begin
      case (toks[k].kind)
        "NULL": nn++;
        "FCT":  begin nf++; if (first_fct < 0) first_fct = k;
                  chk(toks[k].at_state >= 4, "FCT only from Connecting on"); end
        "D", "EOP", "EEP": begin
                  chk(toks[k].at_state == 5, "N-Char only in Run");
                  if (nd < sent_q.size())
                    chk((toks[k].kind == "D" && sent_q[nd] == {1'b0, toks[k].v}) ||
                        (toks[k].kind == "EOP" && sent_q[nd] == 9'h100) ||
                        (toks[k].kind == "EEP" && sent_q[nd] == 9'h101),
                        $sformatf("N-Char %0d is %s %h, expected %h", nd, toks[k].kind, toks[k].v, sent_q[nd]));
                  nd++; end
        "T":    begin nt++; chk(toks[k].v == {2'b10, 6'h2B}, "Time-Code value"); end
        default: chk(0, {"unexpected token ", toks[k].kind});
      endcase
    end
    chk(toks.size() > 0 && toks[0].kind == "NULL", "first character is a NULL");
    chk(nf == 2, $sformatf("two FCTs sent (%0d)", nf));
    chk(nd == sent_q.size(), $sformatf("all %0d N-Chars sent (%0d)", sent_q.size(), nd));
    chk(nt == 1, "one Time-Code");
    chk(par_errs == 0, $sformatf("parity errors %0d", par_errs));
    chk(nn > 10, "NULLs fill idle time");
    chk(n_rule > 0 || n_rate > 100, "bits observed");
    chk(n_zero > 100, "reset phases observed");
    $display("INFO tokens=%0d NULL=%0d FCT=%0d N-Char=%0d TC=%0d bits=%0d", toks.size(), nn, nf, nd, nt, bits.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
