// tb_spw_tx_collecting_adapter: random EightMore and Acknowledge pulses against a
// reference count of pending FCT requests (saturating at 7). Request must be high
// exactly while the reference count is non-zero.
module tb_spw_tx_collecting_adapter;
  logic clk = 0, rst = 1, em = 0, ack = 0, req;
  int checks = 0, failures = 0, ref_cnt = 0, max_seen = 0;
  always #5 clk = ~clk;

  spw_tx_collecting_adapter dut (.clk(clk), .rst(rst), .eight_more(em), .ack(ack), .req(req));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      // Bias towards requests in the first half so the count saturates.
      em  = ($urandom_range(0, 9) < (i < 1500 ? 6 : 3));
      ack = req && ($urandom_range(0, 9) < (i < 1500 ? 2 : 6));
      @(posedge clk);
      if (em && ref_cnt < 7) ref_cnt++;
      if (ack && ref_cnt > 0) ref_cnt--;
      if (ref_cnt > max_seen) max_seen = ref_cnt;
      @(negedge clk);
      checks++;
      if (req != (ref_cnt != 0)) begin failures++; $display("FAIL req=%b ref=%0d", req, ref_cnt); end
    end
    em = 0; ack = 0;
    checks++;
    if (max_seen != 7) begin failures++; $display("FAIL never saturated (%0d)", max_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
