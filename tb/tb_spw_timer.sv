// tb_spw_timer: checks that after_6u4 rises 320 cycles and after_12u8 640
// cycles (6.4 us and 12.8 us at 50 MHz) after a restart, and that a restart
// clears both.
module tb_spw_timer;
  logic clk = 0, rst_n = 0;
  logic restart, after_6u4, after_12u8;
  int checks = 0, failures = 0;

  spw_timer dut (.*);
  always #10 clk = ~clk;   // 50 MHz

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    restart = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      int t6, t12;
      @(negedge clk); restart = 1;
      @(negedge clk); restart = 0;
      check("cleared 6u4", !after_6u4);
      check("cleared 12u8", !after_12u8);
      t6 = -1; t12 = -1;
      for (int c = 1; c <= 700; c++) begin
        @(negedge clk);
        if (after_6u4 && t6 < 0) t6 = c;
        if (after_12u8 && t12 < 0) t12 = c;
      end
      check($sformatf("6.4us at %0d", t6), t6 == 320);
      check($sformatf("12.8us at %0d", t12), t12 == 640);
      check("held", after_6u4 && after_12u8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
