// tb_spw_time_buf: checks that tick_in latches a time code until the
// transmitter takes it (time_sent), that a later tick_in replaces it, and
// that a received code appears on time_out with a tick_out pulse.
module tb_spw_time_buf;
  logic clk = 0, rst_n = 0;
  logic tick_in, time_sent, pending, got_time, tick_out;
  logic [7:0] time_in, time_tx, time_rx, time_out;
  int checks = 0, failures = 0;

  spw_time_buf dut (.*);
  always #10 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick_in = 0; time_sent = 0; got_time = 0; time_in = 0; time_rx = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle", !pending && !tick_out);
    for (int i = 0; i < 20; i++) begin
      logic [7:0] t;
      t = 8'($urandom);
      time_in = t; tick_in = 1; @(negedge clk); tick_in = 0;
      check("pending", pending && time_tx == t);
      repeat ($urandom % 5) @(negedge clk);
      check("held", pending && time_tx == t);
      if (i % 3 == 0) begin
        time_in = ~t; tick_in = 1; @(negedge clk); tick_in = 0;
        check("replaced", pending && time_tx == ~t);
      end
      time_sent = 1; @(negedge clk); time_sent = 0;
      check("taken", !pending);
      time_rx = t ^ 8'h5A; got_time = 1; @(negedge clk); got_time = 0;
      check("tick_out", tick_out && time_out == (t ^ 8'h5A));
      @(negedge clk);
      check("tick_out pulse", !tick_out && time_out == (t ^ 8'h5A));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
