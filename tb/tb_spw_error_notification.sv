// tb_spw_error_notification: checks that each error pulse sets its status bit,
// ErrorReadDone falls while an error is unread and rises after the host read, and the
// error counter counts every error pulse.
module tb_spw_error_notification;
  logic clk = 0, rst = 1;
  logic disc = 0, par = 0, esc = 0, cred = 0, rd = 0;
  logic [3:0] st;
  logic [7:0] cnt;
  logic done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  spw_error_notification dut (.clk(clk), .rst(rst), .disc_err(disc), .parity_err(par),
    .escape_err(esc), .credit_err(cred), .err_read(rd), .err_status(st), .err_count(cnt),
    .err_read_done(done));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (status=%b count=%0d done=%b)", m, st, cnt, done); end
  endtask

  initial begin
    int expected;
    expected = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    chk(done && st == 0 && cnt == 0, "idle after reset");
    for (int k = 0; k < 4; k++) begin
      {cred, esc, par, disc} <= 4'(1 << k);
      @(posedge clk); #1;
      {cred, esc, par, disc} <= '0;
      expected++;
      chk(st == 4'(1 << k), "status bit set");
      chk(!done, "ErrorReadDone low while unread");
      chk(cnt == 8'(expected), "counter");
      repeat (3) @(posedge clk); #1;
      chk(st == 4'(1 << k), "status sticky");
      rd <= 1; @(posedge clk); #1; rd <= 0;
      chk(st == 0 && done, "cleared by read");
    end
    // Two errors together, then a read that coincides with a new error.
    {par, disc} <= 2'b11; @(posedge clk); #1; {par, disc} <= 2'b00;
    chk(st == 4'b0011 && cnt == 8'(expected + 1), "two at once, counted once");
    rd <= 1; esc <= 1; @(posedge clk); #1; rd <= 0; esc <= 0;
    chk(st == 4'b0100 && !done, "new error survives read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
