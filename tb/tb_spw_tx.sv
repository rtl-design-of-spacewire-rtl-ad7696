// tb_spw_tx: runs the transmitter through NULLs, an FCT, N-Chars (data,
// EOP, EEP) and a time code, records the D/S lines and checks:
//  - exactly one of D and S changes per bit, one bit every 5 clocks;
//  - the decoded character stream (reference decoder of spw_tb_pkg) holds
//    the expected characters in order, with no parity or escape errors;
//  - NULLs only while send_fct/send_nchar are off; N-Chars wait for credit;
//  - the credit count (+8 per FCT, -1 per N-Char) and the credit error;
//  - an invalid host character (flag set, bits 7:1 not zero) is dropped,
//    flagged, and halts N-Chars until the transmitter is re-enabled;
//  - the controlled stop: S falls before D.
module tb_spw_tx;
  import spw_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic bit_tick, enable, send_null, send_fct, send_nchar, send_time;
  logic fct_req, fct_sent, nchar_valid, nchar_rd, time_pending, time_sent;
  logic [8:0] nchar;
  logic [7:0] time_code;
  logic got_fct, credit_error, null_sent, invalid_err, dout, sout;
  int n_invalid = 0;
  logic [5:0] credit;
  int checks = 0, failures = 0;
  bit bits[$];
  logic [8:0] fifo[$];
  int last_change = -1, cyc = 0, rate_bad = 0, both_changed = 0;
  logic pd = 0, ps = 0;

  spw_tx dut (.*);
  always #10 clk = ~clk;
  always @(posedge clk) if (invalid_err) n_invalid++;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit tick every 5 clocks
  int tcnt = 0;
  always @(posedge clk) begin
    tcnt <= (tcnt == 4) ? 0 : tcnt + 1;
    bit_tick <= (tcnt == 4);
  end

  // line monitor
  always @(negedge clk) if (enable) begin
    cyc++;
    if (dout != pd || sout != ps) begin
      if (dout != pd && sout != ps) both_changed++;
      if (last_change >= 0 && cyc - last_change != 5) rate_bad++;
      last_change = cyc;
      bits.push_back(dout);
    end
    pd = dout; ps = sout;
  end

  // transmit FIFO and receive-buffer models
  assign nchar_valid = fifo.size() != 0;
  assign nchar = fifo.size() != 0 ? fifo[0] : '0;
  always @(posedge clk) begin
    if (nchar_rd) begin #1; void'(fifo.pop_front()); end
    if (fct_sent) fct_req <= 0;
    if (time_sent) time_pending <= 0;
  end

  initial begin
    spw_dec dec;
    enable = 0; send_null = 0; send_fct = 0; send_nchar = 0; send_time = 0;
    fct_req = 0; time_pending = 0; time_code = 0; got_fct = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    check("idle lines low", !dout && !sout);
    // Started: NULLs only, even with data waiting
    fifo.push_back(9'h0A5);
    enable = 1; send_null = 1;
    repeat (200) @(negedge clk);
    check("no N-Char before Run", fifo.size() == 1);
    // Connecting: one FCT
    send_fct = 1; fct_req = 1;
    repeat (200) @(negedge clk);
    check("FCT taken", !fct_req);
    // Run: no credit yet, so nothing sent
    send_nchar = 1; send_time = 1;
    fifo.push_back(9'h03C); fifo.push_back(9'h100); fifo.push_back(9'h001); fifo.push_back(9'h101);
    repeat (200) @(negedge clk);
    check("no N-Char without credit", fifo.size() == 5);
    @(negedge clk); got_fct = 1; @(negedge clk); got_fct = 0;
    @(negedge clk);
    check($sformatf("credit 8 (%0d)", credit), credit == 8);
    repeat (600) @(negedge clk);
    check("all N-Chars sent", fifo.size() == 0);
    check($sformatf("credit 3 (%0d)", credit), credit == 3);
    time_code = 8'h2A; time_pending = 1;
    repeat (200) @(negedge clk);
    check("time code taken", !time_pending);
    // invalid host character
    fifo.push_back(9'h1FE); fifo.push_back(9'h077);
    repeat (300) @(negedge clk);
    check($sformatf("invalid character flagged once (%0d)", n_invalid), n_invalid == 1);
    check($sformatf("invalid character dropped, next N-Char held (%0d %h)", fifo.size(), fifo.size() ? fifo[0] : 0), fifo.size() == 1 && fifo[0] == 9'h077);
    check($sformatf("no credit used (%0d)", credit), credit == 3);
    // credit overflow: 3 + 6*8 = 51 ok, 7th FCT -> error
    for (int k = 0; k < 7; k++) begin
      int err;
      @(negedge clk); got_fct = 1; @(negedge clk); got_fct = 0;
      err = credit_error;
      @(negedge clk);
      if (k < 6) check("no credit error", !err);
      else       check("credit error", err);
    end
    check($sformatf("credit 51 (%0d)", credit), credit == 51);
    repeat (100) @(negedge clk);
    // controlled stop
    wait (sout == 1 && dout == 1);
    @(negedge clk);
    enable = 0;
    @(negedge clk);
    check("S cleared first", !sout && dout);
    @(negedge clk);
    check("then D", !sout && !dout);
    // analyse the stream
    check("one line change per bit", both_changed == 0);
    check($sformatf("bit period 5 clocks (%0d bad)", rate_bad), rate_bad == 0);
    dec = new;
    dec.parse(bits);
    begin
      tok_t nn[$];
      tok_kind_e exp_k[$] = '{T_FCT, T_DATA, T_DATA, T_EOP, T_DATA, T_EEP, T_TIME};
      int exp_v[$] = '{0, 'hA5, 'h3C, 0, 'h01, 0, 'h2A};
      int nulls = 0;
      foreach (dec.toks[i]) if (dec.toks[i].kind != T_NULL) nn.push_back(dec.toks[i]); else nulls++;
      check($sformatf("NULLs sent (%0d)", nulls), nulls > 20);
      check($sformatf("token count %0d", nn.size()), nn.size() == exp_k.size());
      foreach (exp_k[i]) if (i < nn.size()) begin
        check($sformatf("token %0d kind %0d", i, nn[i].kind), nn[i].kind == exp_k[i]);
        check($sformatf("token %0d value %0h", i, nn[i].val), nn[i].val == exp_v[i]);
      end
    end
    // re-enabling clears the halt: the held N-Char goes out
    @(negedge clk); enable = 1;
    @(negedge clk); got_fct = 1; @(negedge clk); got_fct = 0;
    repeat (300) @(negedge clk);
    check("N-Chars resume after re-enable", fifo.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
