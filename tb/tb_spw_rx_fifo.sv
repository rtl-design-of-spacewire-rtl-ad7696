// tb_spw_rx_fifo: checks the receive-side credit against an independent
// model: FCTs offered only for 8 unpromised free places and up to 56
// outstanding; +8 per FCT sent, -1 per N-Char; a write without credit is a
// credit error and is not stored; clearing empties the credit. A second,
// 16-deep instance checks the free-space limit; data order is checked too;
// an inserted end marker is stored without credit.
module tb_spw_rx_fifo;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic clr, crd, avail, cerr, wr, full, rd, empty, ins;
  logic [5:0] credit;
  logic [8:0] din, dout;
  logic clr2, crd2, avail2, cerr2, wr2, full2, rd2, empty2;
  logic [5:0] credit2;
  logic [8:0] dout2;

  spw_rx_fifo dut (.clk, .rst_n, .credit_clr(clr), .credit_rd(crd), .credit_avail(avail),
    .credit_error(cerr), .credit, .wr, .din, .ins, .ins_din(9'h101), .full, .rd, .dout, .empty);
  spw_rx_fifo #(.DEPTH(16)) dut2 (.clk, .rst_n, .credit_clr(clr2), .credit_rd(crd2), .credit_avail(avail2),
    .credit_error(cerr2), .credit(credit2), .wr(wr2), .din, .ins(1'b0), .ins_din(9'h0), .full(full2), .rd(rd2), .dout(dout2), .empty(empty2));

  always #10 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt, cr;
  task automatic step(logic w, logic r, logic c);
    wr = w; rd = r; crd = c;
    @(negedge clk);
    wr = 0; rd = 0; crd = 0;
  endtask

  initial begin
    int fcts;
    clr = 1; crd = 0; wr = 0; rd = 0; din = 0; ins = 0;
    clr2 = 1; crd2 = 0; wr2 = 0; rd2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("no FCT while cleared", !avail);
    clr = 0; clr2 = 0;
    @(negedge clk);
    check("FCT offered", avail);
    // write without credit
    din = 9'h1AA;
    wr = 1; @(negedge clk); wr = 0;
    check("credit error", cerr);
    check("not stored", empty);
    @(negedge clk);
    check("error is a pulse", !cerr);
    // take all FCTs
    fcts = 0;
    while (avail && fcts < 20) begin step(0, 0, 1); fcts++; end
    check($sformatf("7 FCTs (%0d)", fcts), fcts == 7);
    check($sformatf("credit 56 (%0d)", credit), credit == 56);
    // 20 N-Chars
    for (int i = 0; i < 20; i++) begin din = 9'(i); step(1, 0, 0); end
    check($sformatf("credit 36 (%0d)", credit), credit == 36);
    check("FCT offered again", avail);
    check("no credit error", !cerr);
    for (int i = 0; i < 20; i++) begin
      check($sformatf("order %0d", i), dout == 9'(i));
      step(0, 1, 0);
    end
    check("empty", empty);
    // clear
    clr = 1; @(negedge clk); clr = 0; @(negedge clk);
    check("credit cleared", credit == 0);
    // insert an EEP with no credit: stored, no credit error
    ins = 1; @(negedge clk); ins = 0;
    check("inserted without credit error", !cerr && credit == 0);
    check($sformatf("inserted EEP stored (%h)", dout), !empty && dout == 9'h101);
    step(0, 1, 0);
    check("empty after reading the EEP", empty);
    // 16-deep: space limit
    fcts = 0;
    while (avail2 && fcts < 20) begin crd2 = 1; @(negedge clk); crd2 = 0; fcts++; end
    check($sformatf("2 FCTs for 16 places (%0d)", fcts), fcts == 2);
    for (int i = 0; i < 8; i++) begin wr2 = 1; din = 9'(i); @(negedge clk); end
    wr2 = 0; @(negedge clk);
    check("no FCT while 8 stored + 8 promised", !avail2 && credit2 == 8);
    for (int i = 0; i < 8; i++) begin rd2 = 1; @(negedge clk); end
    rd2 = 0; @(negedge clk);
    check("FCT after reads free 8 places", avail2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
