// tb_spw_recovery: checks that RX_CLOCK is Datain XOR Strobein for every input pair,
// and that it toggles once per bit on a short DS-encoded sequence.
module tb_spw_recovery;
  logic d, s, rxc;
  int checks = 0, failures = 0;

  spw_recovery dut (.d_in(d), .s_in(s), .rx_clock(rxc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    for (int i = 0; i < 4; i++) begin
      {d, s} = 2'(i);
      #1;
      checks++;
      if (rxc !== ((i == 1 || i == 2) ? 1'b1 : 1'b0)) begin
        failures++; $display("FAIL d=%b s=%b rxc=%b", d, s, rxc);
      end
    end
    // DS sequence: exactly one line changes per bit, so RX_CLOCK toggles every bit.
    d = 0; s = 0; #1; prev = rxc;
    for (int i = 0; i < 32; i++) begin
      logic b;
      b = 1'($urandom);
      if (b == d) s = ~s; else d = b;
      #1;
      checks++;
      if (rxc == prev) begin failures++; $display("FAIL no toggle at bit %0d", i); end
      prev = rxc;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
