// tb_spw_tx_baudrate_counter: checks that TX_Clockenable pulses exactly once every
// DIVISOR cycles (default 10) and never two cycles in a row.
module tb_spw_tx_baudrate_counter;
  logic clk = 0, rst = 1, en;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  spw_tx_baudrate_counter dut (.clk(clk), .rst(rst), .tx_clk_en(en));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, n, cyc;
    last = -1; n = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (cyc = 0; cyc < 1000; cyc++) begin
      @(posedge clk); #1;
      if (en) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != 10) begin failures++; $display("FAIL period %0d", cyc - last); end
        end
        last = cyc; n++;
      end
    end
    checks++;
    if (n != 100) begin failures++; $display("FAIL %0d pulses in 1000 cycles", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
