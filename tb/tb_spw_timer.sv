// tb_spw_timer: checks that After6.4 and After12.8 are high from the T6U4-th and
// T12U8-th cycle after a restart (so a state waiting for them lasts exactly that many
// cycles), stay high, and fall again on the next restart. It runs at the
// default 640 / 1280 cycles (6.4 us / 12.8 us at 100 MHz).
module tb_spw_timer;
  localparam int T1 = 640, T2 = 1280;
  logic clk = 0, rst = 1, restart = 0, a1, a2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  spw_timer dut (.clk(clk), .rst(rst), .restart(restart), .after_6u4(a1), .after_12u8(a2));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_once(input int stop_at);
    int c1, c2;
    c1 = -1; c2 = -1;
    restart <= 1; @(posedge clk); restart <= 0;
    for (int c = 1; c <= stop_at; c++) begin
      @(posedge clk); #1;
      if (a1 && c1 < 0) c1 = c;
      if (a2 && c2 < 0) c2 = c;
      if (c1 >= 0 && !a1) begin failures++; $display("FAIL After6.4 dropped"); end
    end
    if (stop_at >= T2) begin
      checks += 2;
      if (c1 != T1 - 1) begin failures++; $display("FAIL After6.4 at %0d", c1); end
      if (c2 != T2 - 1) begin failures++; $display("FAIL After12.8 at %0d", c2); end
    end else begin
      checks++;
      if (c2 >= 0) begin failures++; $display("FAIL After12.8 early"); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    run_once(T2 + 50);
    run_once(T1 + 10);          // restart in the middle
    run_once(T2 + 5);
    checks++;
    restart <= 1; @(posedge clk); restart <= 0; #1;
    if (a1 || a2) begin failures++; $display("FAIL not cleared by restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
