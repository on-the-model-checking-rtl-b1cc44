// tb_spw_tx_timecode_reg: Time_Out and TimeControlFlag_Out take the input values only
// on Tick_IN and hold them otherwise.
module tb_spw_tx_timecode_reg;
  logic clk = 0, rst = 1, tick = 0;
  logic [5:0] tin = 0, tout;
  logic [1:0] fin = 0, fout;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  spw_tx_timecode_reg dut (.clk(clk), .rst(rst), .tick_in(tick), .time_in(tin),
    .ctrl_flags_in(fin), .time_out(tout), .ctrl_flags_out(fout));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] held;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    held = 0;
    for (int i = 0; i < 200; i++) begin
      tick = ($urandom_range(0, 3) == 0);
      {fin, tin} = 8'($urandom);
      @(negedge clk);
      if (tick) held = {fin, tin};
      checks++;
      if ({fout, tout} != held) begin failures++; $display("FAIL %h vs %h", {fout, tout}, held); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
