// tb_spw_tx_simple_adapter: a Tick_IN pulse raises Request, which holds until
// Acknowledge; a second tick before the acknowledge does not leave a second request.
module tb_spw_tx_simple_adapter;
  logic clk = 0, rst = 1, tick = 0, ack = 0, req;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  spw_tx_simple_adapter dut (.clk(clk), .rst(rst), .tick_in(tick), .ack(ack), .req(req));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    chk(!req, "idle after reset");
    tick = 1; @(negedge clk); tick = 0;
    chk(req, "request after tick");
    repeat (10) @(negedge clk);
    chk(req, "request holds");
    tick = 1; @(negedge clk); tick = 0;
    ack = 1; @(negedge clk); ack = 0;
    chk(!req, "cleared by acknowledge, second tick not queued");
    tick = 1; @(negedge clk); tick = 0;
    rst = 1; @(negedge clk); rst = 0;
    chk(!req, "cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
