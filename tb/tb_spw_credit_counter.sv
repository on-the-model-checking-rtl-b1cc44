// tb_spw_credit_counter: checks transmit credit (8 per FCT, one per N-Char sent, NoCredit
// at zero, credit error above 56) and receive credit (EightMore requests up to 56 while
// BUFFER_READY, one per N-Char received, credit error on an N-Char with none granted).
module tb_spw_credit_counter;
  logic clk = 0, txr = 1, rxr = 1;
  logic gfct = 0, nsent = 0, gnchar = 0, bready = 0;
  logic nocred, em, cerr;
  logic [5:0] txc, rxc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  spw_credit_counter dut (.clk(clk), .tx_reset(txr), .rx_reset(rxr), .got_fct(gfct),
    .nchar_sent(nsent), .got_nchar(gnchar), .buffer_ready(bready), .no_credit(nocred),
    .eight_more(em), .credit_err(cerr), .tx_credit(txc), .rx_credit(rxc));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (tx=%0d rx=%0d nocred=%b em=%b err=%b)", m, txc, rxc, nocred, em, cerr); end
  endtask

  // Pulse one of the inputs for a cycle: 0 = gotFCT, 1 = nchar_sent, 2 = got_nchar.
  task automatic pulse(input int which);
    case (which)
      0: gfct <= 1;
      1: nsent <= 1;
      default: gnchar <= 1;
    endcase
    @(posedge clk);
    gfct <= 0; nsent <= 0; gnchar <= 0;
    @(posedge clk); #1;
  endtask

  initial begin
    int ems;
    repeat (3) @(posedge clk);
    txr <= 0; rxr <= 0;
    @(posedge clk); #1;
    chk(nocred && txc == 0, "no credit after reset");
    pulse(0);
    chk(!nocred && txc == 8, "one FCT gives 8");
    for (int i = 0; i < 8; i++) pulse(1);
    chk(nocred && txc == 0, "8 N-Chars use it up");
    for (int i = 0; i < 7; i++) pulse(0);
    chk(txc == 56 && !cerr, "seven FCTs give 56");
    gfct <= 1; @(posedge clk); gfct <= 0; #1;
    chk(cerr && txc == 56, "eighth FCT is a credit error");
    @(posedge clk); #1;
    chk(!cerr, "credit error is a pulse");
    txr <= 1; @(posedge clk); txr <= 0; @(posedge clk); #1;
    chk(txc == 0, "TX_Reset clears credit");
    // Receive side.
    @(posedge clk); #1;
    chk(!em && rxc == 0, "no request without BUFFER_READY");
    bready <= 1; ems = 0;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      if (em) ems++;
    end
    bready <= 0; @(posedge clk); #1;
    chk(ems == 7 && rxc == 56, "seven EightMore up to 56");
    for (int i = 0; i < 56; i++) pulse(2);
    chk(rxc == 0 && !cerr, "56 N-Chars received");
    gnchar <= 1; @(posedge clk); gnchar <= 0; #1;
    chk(cerr, "N-Char beyond credit is an error");
    bready <= 1; @(posedge clk); #1; bready <= 0;
    chk(rxc == 8, "BUFFER_READY grants 8 again");
    txr <= 1; bready <= 1; @(posedge clk); #1;
    chk(!em, "no request while transmitter reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
