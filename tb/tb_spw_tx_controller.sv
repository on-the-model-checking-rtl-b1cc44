// tb_spw_tx_controller: every combination of the controller's inputs against a
// reference of the selection rule: nothing without a free bit slot; then Time-Code
// (Send_All and tick), FCT (Send_FCT, request, first NULL gone), N-Char (Send_All,
// data, credit), NULL (Send_NULL), else nothing. Exactly the served source is
// acknowledged.
module tb_spw_tx_controller;
  import spw_pkg::*;
  logic en, need, snull, sfct, sall, fng, nocred, freq, treq, nvalid;
  logic provide, fack, tack, ntake;
  tx_char_t sel;
  int checks = 0, failures = 0;

  spw_tx_controller dut (.tx_clk_en(en), .need(need), .send_null(snull), .send_fct(sfct),
    .send_all(sall), .first_null_gone(fng), .no_credit(nocred), .fct_req(freq),
    .tick_req(treq), .nchar_valid(nvalid), .provide(provide), .sel(sel), .fct_ack(fack),
    .tick_ack(tack), .nchar_take(ntake));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_prov, e_fack, e_tack, e_take;
    tx_char_t e_sel;
    for (int v = 0; v < 1024; v++) begin
      {en, need, snull, sfct, sall, fng, nocred, freq, treq, nvalid} = 10'(v);
      #1;
      e_prov = 0; e_fack = 0; e_tack = 0; e_take = 0; e_sel = CH_NULL;
      if (en && need) begin
        if (sall && treq)                    begin e_prov = 1; e_sel = CH_TIME;  e_tack = 1; end
        else if (sfct && freq && fng)        begin e_prov = 1; e_sel = CH_FCT;   e_fack = 1; end
        else if (sall && nvalid && !nocred)  begin e_prov = 1; e_sel = CH_NCHAR; e_take = 1; end
        else if (snull)                      begin e_prov = 1; e_sel = CH_NULL;  end
      end
      checks++;
      if (provide != e_prov || (e_prov && sel != e_sel) || fack != e_fack ||
          tack != e_tack || ntake != e_take) begin
        failures++;
        $display("FAIL inputs %b: provide=%b sel=%0d acks=%b%b%b", 10'(v), provide, sel, fack, tack, ntake);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
