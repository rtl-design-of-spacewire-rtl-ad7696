// tb_spw_rx_clkrec: drives a DS-encoded random bit stream (5 clocks per
// bit) and checks the recovered bits, got_bit, and the disconnect error:
// none while bits flow, raised 43..48 clocks (850 ns at 50 MHz) after the
// last transition, cleared when the receiver is disabled.
module tb_spw_rx_clkrec;
  logic clk = 0, rst_n = 0;
  logic enable, din, sin, bit_valid, bit_val, got_bit, disc_err;
  int checks = 0, failures = 0;
  bit sent[$], got[$];

  spw_rx_clkrec dut (.*);
  always #10 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && bit_valid) got.push_back(bit_val);

  int disc_seen_early = 0;
  bit running = 0;
  always @(posedge clk) if (running && disc_err) disc_seen_early++;

  initial begin
    enable = 0; din = 0; sin = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); enable = 1;
    repeat (10) @(negedge clk);
    check("no got_bit before first edge", !got_bit);
    running = 1;
    for (int i = 0; i < 400; i++) begin
      bit b;
      b = $urandom % 2;
      if (b == din) sin = ~sin;
      din = b;
      sent.push_back(b);
      repeat (5) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    running = 0;
    check("got_bit", got_bit);
    check("no disconnect while running", disc_seen_early == 0);
    check($sformatf("bit count %0d/%0d", got.size(), sent.size()), got.size() == sent.size());
    for (int i = 0; i < sent.size() && i < got.size(); i++) begin
      check("bit value", got[i] == sent[i]);
    end
    // silence: last edge was 9 clocks ago (5 + 4)
    begin
      int t;
      t = 9;
      while (!disc_err && t < 200) begin @(negedge clk); t++; end
      check($sformatf("disconnect after %0d clocks", t), t >= 43 && t <= 48);
    end
    @(negedge clk); enable = 0;
    @(negedge clk);
    check("cleared by disable", !disc_err && !got_bit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
