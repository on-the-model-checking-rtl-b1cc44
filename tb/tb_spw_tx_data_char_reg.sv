// tb_spw_tx_data_char_reg: host handshake of the N-Char register. TX_Ready is high
// while empty, falls on the edge that stores TX_Data, a write while not ready is
// ignored, and `take` empties the register again. Random data is checked on TX_Cargo.
module tb_spw_tx_data_char_reg;
  logic clk = 0, rst = 1, wr = 0, take = 0, rdy, valid;
  logic [8:0] wd = 0, cargo;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  spw_tx_data_char_reg dut (.clk(clk), .rst(rst), .tx_write(wr), .tx_data(wd), .take(take),
    .tx_ready(rdy), .valid(valid), .cargo(cargo));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    logic [8:0] v;
    repeat (3) @(posedge clk);
    @(negedge clk);
    chk(!rdy, "not ready in reset");
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < 50; i++) begin
      chk(rdy && !valid, "ready when empty");
      v = 9'($urandom);
      wr = 1; wd = v; @(negedge clk); wr = 0;
      chk(!rdy && valid && cargo == v, "stored and TX_Ready low");
      wr = 1; wd = ~v; @(negedge clk); wr = 0;
      chk(cargo == v, "write while not ready ignored");
      repeat ($urandom_range(0, 3)) @(negedge clk);
      take = 1; @(negedge clk); take = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
