// tb_spw_controller: walks the link state machine through every transition of its
// state diagram. In each state it checks TX_Reset, RX_Reset, Send_NULL, Send_FCT and
// Send_All against a table of the expected levels per state.
module tb_spw_controller;
  import spw_pkg::*;
  logic clk = 0, rst = 1;
  logic a64 = 0, a128 = 0, trst;
  logic gnull = 0, gfct = 0, gnchar = 0, gtc = 0, rxerr = 0, crerr = 0;
  logic lstart = 0, ldis = 0, auto_s = 0, fempty = 0, rdone = 0;
  logic txr, rxr, snull, sfct, sall;
  link_state_t st;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  spw_controller dut (.clk(clk), .rst(rst), .after_6u4(a64), .after_12u8(a128),
    .timer_restart(trst), .got_null(gnull), .got_fct(gfct), .got_nchar(gnchar),
    .got_timecode(gtc), .rx_err(rxerr), .credit_err(crerr), .link_start(lstart),
    .link_disable(ldis), .autostart(auto_s), .fifo_empty(fempty), .err_read_done(rdone),
    .tx_reset(txr), .rx_reset(rxr), .send_null(snull), .send_fct(sfct), .send_all(sall),
    .state(st));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected {TX_Reset, RX_Reset, Send_NULL, Send_FCT, Send_All} for S0..S6.
  function automatic logic [4:0] expect_out(input int s);
    case (s)
      0: return 5'b11000;
      1: return 5'b10000;
      2: return 5'b10000;
      3: return 5'b00100;
      4: return 5'b00110;
      5: return 5'b00111;
      default: return 5'b10000;
    endcase
  endfunction

  task automatic clear_in();
    a64 <= 0; a128 <= 0; gnull <= 0; gfct <= 0; gnchar <= 0; gtc <= 0; rxerr <= 0;
    crerr <= 0; lstart <= 0; ldis <= 0; auto_s <= 0; fempty <= 0; rdone <= 0;
  endtask

  task automatic expect_state(input int s, input string m);
    @(posedge clk); #1;
    clear_in();
    checks += 2;
    if (int'(st) != s) begin failures++; $display("FAIL %s: state %0d, expected %0d", m, st, s); end
    if ({txr, rxr, snull, sfct, sall} != expect_out(s)) begin
      failures++; $display("FAIL %s: outputs %b in S%0d", m, {txr, rxr, snull, sfct, sall}, s);
    end
  endtask

  // Drive ErrorReset -> ... up to the given state along the normal path.
  task automatic go_to(input int s);
    rst <= 1; @(posedge clk); rst <= 0; #1;
    if (s == 0) return;
    a64 <= 1;                 expect_state(1, "ErrorReset->ErrorWait");
    if (s == 1) return;
    a128 <= 1;                expect_state(2, "ErrorWait->Ready");
    if (s == 2) return;
    lstart <= 1;              expect_state(3, "Ready->Started");
    if (s == 3) return;
    gnull <= 1;               expect_state(4, "Started->Connecting");
    if (s == 4) return;
    gnull <= 1; gfct <= 1;    expect_state(5, "Connecting->Run");
    if (s == 5) return;
    rxerr <= 1;               expect_state(6, "Run->ErrAnalysis");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // Reset state and its outputs.
    go_to(0);
    expect_state(0, "stay in ErrorReset without After6.4");
    // Reset held: no move even with After6.4.
    rst <= 1; a64 <= 1; @(posedge clk); #1; a64 <= 1; @(posedge clk); #1;
    checks++; if (st != ST_ERROR_RESET) begin failures++; $display("FAIL left ErrorReset under reset"); end
    rst <= 0; a64 <= 0;
    // Full path and back.
    go_to(6);
    expect_state(6, "ErrAnalysis waits");
    fempty <= 1;               expect_state(6, "ErrAnalysis needs ErrorReadDone too");
    rdone <= 1;                expect_state(6, "ErrAnalysis needs FIFO_Empty too");
    fempty <= 1; rdone <= 1;   expect_state(0, "ErrAnalysis->ErrorReset");
    // Error exits from ErrorWait, Ready, Started, Connecting.
    go_to(1); rxerr <= 1;      expect_state(0, "ErrorWait rx error");
    go_to(1); gfct <= 1;       expect_state(0, "ErrorWait gotFCT");
    go_to(2); gnchar <= 1;     expect_state(0, "Ready gotN-Char");
    go_to(2); gtc <= 1;        expect_state(0, "Ready gotTime-Code");
    go_to(2); ldis <= 1; lstart <= 1; expect_state(2, "Ready stays while disabled");
    go_to(2); auto_s <= 1;     expect_state(2, "autostart waits for gotNULL");
    go_to(2); auto_s <= 1; gnull <= 1; expect_state(3, "autostart with gotNULL");
    go_to(3); a128 <= 1;       expect_state(0, "Started timeout");
    go_to(3); gfct <= 1;       expect_state(0, "Started gotFCT");
    go_to(4); a128 <= 1;       expect_state(0, "Connecting timeout");
    go_to(4); gnchar <= 1;     expect_state(0, "Connecting gotN-Char");
    go_to(4); rxerr <= 1;      expect_state(0, "Connecting rx error");
    go_to(4); gnull <= 1;      expect_state(4, "Connecting stays on NULL");
    go_to(5); crerr <= 1;      expect_state(6, "Run credit error");
    go_to(5); ldis <= 1;       expect_state(6, "Run link disabled");
    go_to(5); gnchar <= 1; gtc <= 1; gfct <= 1; expect_state(5, "Run stays on traffic");
    // Timer restart on a state change.
    go_to(2); lstart <= 1; #1;
    checks++; if (!trst) begin failures++; $display("FAIL no timer restart on change"); end
    @(posedge clk); #1; lstart <= 0; #1;
    checks++; if (trst) begin failures++; $display("FAIL timer restart without change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
