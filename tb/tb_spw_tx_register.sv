// tb_spw_tx_register: loads random characters of every type and decodes the DataOut /
// StrobeOut stream with an independent decoder. It checks the bit patterns, the odd
// parity, the DS rule (one line changes per bit), one bit per TX_Clockenable, the
// character lengths (FCT/EOP/EEP 4, NULL 8, data 10, Time-Code 14 bits), lines low in
// reset, FirstNULL_gone and NCharOnTrip.
module tb_spw_tx_register;
  import spw_pkg::*;
  logic clk = 0, rst = 1, en = 0, provide = 0;
  tx_char_t sel = CH_NULL;
  logic [8:0] cargo = 0;
  logic [5:0] tv = 0;
  logic [1:0] tf = 0;
  logic need, d, s, fng, ntrip;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  spw_tx_register dut (.clk(clk), .rst(rst), .tx_clk_en(en), .provide(provide), .sel(sel),
    .cargo(cargo), .time_val(tv), .time_flags(tf), .need(need), .d_out(d), .s_out(s),
    .first_null_gone(fng), .nchar_on_trip(ntrip));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  logic bits[$];
  logic pd, ps;
  // One bit per enable: the enable is asserted for one cycle at a time, with the
  // register's inputs set up for it.
  task automatic tick_bit();
    en = 1; @(negedge clk); en = 0;
    chk((d ^ pd) + (s ^ ps) == 1, "DS rule");
    bits.push_back(d);
    pd = d; ps = s;
    repeat (2) @(negedge clk);
  endtask

  typedef struct { tx_char_t t; logic [8:0] c; logic [7:0] tc; } ch_t;
  ch_t sent[$];

  initial begin
    int i, n, len;
    logic prev, p, f;
    logic [7:0] v;
    repeat (3) @(negedge clk);
    chk(!d && !s, "lines low in reset");
    rst = 0; pd = 0; ps = 0;
    @(negedge clk);
    chk(need && !fng, "empty after reset");
    for (n = 0; n < 60; n++) begin
      ch_t c;
      c.t = (n == 0) ? CH_NULL : tx_char_t'($urandom_range(0, 3));
      c.c = {1'($urandom_range(0, 3) == 0), 8'($urandom)};
      c.tc = 8'($urandom);
      sent.push_back(c);
      sel = c.t; cargo = c.c; {tf, tv} = c.tc; provide = 1;
      len = 0;
      chk(need, "need before load");
      en = 1; @(negedge clk); en = 0; provide = 0;
      chk((d ^ pd) + (s ^ ps) == 1, "DS rule on first bit");
      bits.push_back(d); pd = d; ps = s; len++;
      chk(ntrip == (c.t == CH_NCHAR), "NCharOnTrip");
      chk(fng, "FirstNULL_gone after the first NULL");
      while (!need) begin tick_bit(); len++; end
      case (c.t)
        CH_NULL: chk(len == 8, "NULL length");
        CH_FCT:  chk(len == 4, "FCT length");
        CH_TIME: chk(len == 14, "Time-Code length");
        default: chk(len == (c.c[8] ? 4 : 10), "N-Char length");
      endcase
    end
    // Decode.
    i = 0; prev = 0;
    foreach (sent[k]) begin
      logic [1:0] ctl;
      logic [7:0] dv;
      // First (or only) character.
      p = bits[i]; f = bits[i+1];
      chk((prev ^ p ^ f) == 1, $sformatf("parity of char %0d", k));
      if (f) begin
        ctl = {bits[i+2], bits[i+3]}; i += 4; prev = ^ctl;
      end else begin
        for (int b = 0; b < 8; b++) dv[b] = bits[i+2+b];
        i += 10; prev = ^dv;
      end
      case (sent[k].t)
        CH_FCT:  chk(f && ctl == 2'b00, "FCT code");
        CH_NCHAR:
          if (sent[k].c[8]) chk(f && ctl == (sent[k].c[0] ? 2'b10 : 2'b01), "EOP/EEP code");
          else              chk(!f && dv == sent[k].c[7:0], "data value");
        default: begin  // NULL and Time-Code start with ESC
          chk(f && ctl == 2'b11, "ESC first");
          p = bits[i]; f = bits[i+1];
          chk((prev ^ p ^ f) == 1, "parity of second half");
          if (sent[k].t == CH_NULL) begin
            ctl = {bits[i+2], bits[i+3]}; i += 4; prev = ^ctl;
            chk(f && ctl == 2'b00, "NULL = ESC FCT");
          end else begin
            for (int b = 0; b < 8; b++) dv[b] = bits[i+2+b];
            i += 10; prev = ^dv;
            chk(!f && dv == sent[k].tc, "Time-Code value");
          end
        end
      endcase
    end
    chk(i == bits.size(), "all bits accounted for");
    rst = 1; @(negedge clk);
    chk(!d && !s && !fng, "reset clears lines and FirstNULL_gone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
