// tb_spw_tx_clock: checks the bit-rate tick period for several divisors,
// including the clamp of divisors below 2 to 2.
module tb_spw_tx_clock;
  logic clk = 0, rst_n = 0;
  logic [7:0] div;
  logic tick;
  int checks = 0, failures = 0;

  spw_tx_clock dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(int d, int expect_p);
    int last, n;
    div = 8'(d);
    repeat (3 * 256) @(posedge clk);   // settle on new divisor
    last = -1; n = 0;
    for (int c = 0; n < 6; c++) begin
      @(posedge clk); #1;
      if (tick) begin
        if (last >= 0) begin
          checks++;
          if (c - last != expect_p) begin failures++; $display("FAIL div=%0d period %0d", d, c - last); end
        end
        last = c; n++;
      end
    end
  endtask

  initial begin
    div = 5;
    repeat (2) @(posedge clk);
    rst_n = 1;
    measure(5, 5);
    measure(3, 3);
    measure(10, 10);
    measure(2, 2);
    measure(1, 2);
    measure(0, 2);
    measure(200, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
