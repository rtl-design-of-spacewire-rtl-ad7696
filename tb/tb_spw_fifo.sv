// tb_spw_fifo: self-checking test of the synchronous FIFO.
// Pushes and pops random words against a queue model, including fills to
// full, writes while full (must be dropped), reads while empty and
// simultaneous push/pop; checks dout, full, empty and count every cycle.
module tb_spw_fifo;
  localparam int W = 9, D = 8;
  logic clk = 0, rst_n = 0;
  logic wr, rd;
  logic [W-1:0] din, dout;
  logic full, empty;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  spw_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #200000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = 0; rd = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check("empty", empty == (model.size() == 0));
      check("full", full == (model.size() == D));
      check("count", count == model.size());
      if (model.size() != 0) check("dout", dout == model[0]);
      // phases: fill, drain, random
      if (i < 300)      begin wr = ($urandom % 4) != 0; rd = ($urandom % 4) == 0; end
      else if (i < 600) begin wr = ($urandom % 4) == 0; rd = ($urandom % 4) != 0; end
      else              begin wr = $urandom % 2; rd = $urandom % 2; end
      din = W'($urandom);
      @(posedge clk);
      #1;
      begin
        int sz;
        sz = model.size();
        if (rd && sz != 0) void'(model.pop_front());
        if (wr && sz < D) model.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
