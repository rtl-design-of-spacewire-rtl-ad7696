// tb_spw_rx: feeds reference-encoded bit streams (spw_tb_pkg) into the
// character decoder, one bit every 3 clocks, and checks: characters before
// the first NULL are ignored; NULLs, FCTs, data, EOP, EEP and time codes are
// reported with the right values; and parity, escape and empty-packet errors
// are each detected.
module tb_spw_rx;
  import spw_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic enable, bit_valid, bit_val;
  logic null_seen, got_null, got_fct, got_nchar, got_time, err_par, err_esc, err_empty;
  logic [8:0] nchar;
  logic [7:0] time_code;
  int checks = 0, failures = 0;
  int n_null, n_fct, n_time, n_par, n_esc, n_empty;
  logic [8:0] nchars[$];
  logic [7:0] times[$];

  spw_rx dut (.*);
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

  always @(posedge clk) if (rst_n) begin
    if (got_null) n_null++;
    if (got_fct) n_fct++;
    if (got_nchar) nchars.push_back(nchar);
    if (got_time) begin n_time++; times.push_back(time_code); end
    if (err_par) n_par++;
    if (err_esc) n_esc++;
    if (err_empty) n_empty++;
  end

  task automatic clear();
    n_null = 0; n_fct = 0; n_time = 0; n_par = 0; n_esc = 0; n_empty = 0;
    nchars = {}; times = {};
    @(negedge clk); enable = 0;
    @(negedge clk); enable = 1;
  endtask

  task automatic send(spw_enc e);
    foreach (e.q[i]) begin
      @(negedge clk); bit_valid = 1; bit_val = e.q[i];
      @(negedge clk); bit_valid = 0;
      @(negedge clk);
    end
    repeat (4) @(negedge clk);
  endtask

  initial begin
    spw_enc e;
    enable = 0; bit_valid = 0; bit_val = 0;
    n_null = 0; n_fct = 0; n_time = 0; n_par = 0; n_esc = 0; n_empty = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1: characters before the first NULL are ignored
    clear();
    e = new; e.fct(); e.data(8'h55); e.eop();
    send(e);
    check("nothing before NULL", n_fct == 0 && nchars.size() == 0 && !null_seen && n_par == 0);
    // 2: normal stream, preceded by bits that do not form a NULL
    clear();
    e = new;
    e.q = '{0, 0, 1, 0, 0, 1, 0};
    e.nul(); e.nul(); e.fct(); e.data(8'h11); e.data(8'hFE); e.eop();
    e.data(8'h22); e.eep(); e.tcode(8'h15); e.nul(); e.fct();
    send(e);
    check("null seen", null_seen);
    check($sformatf("NULLs %0d", n_null), n_null == 3);
    check($sformatf("FCTs %0d", n_fct), n_fct == 2);
    check($sformatf("N-Chars %0d", nchars.size()), nchars.size() == 5);
    if (nchars.size() == 5) begin
      check("d0", nchars[0] == 9'h011); check("d1", nchars[1] == 9'h0FE);
      check("eop", nchars[2] == 9'h100); check("d2", nchars[3] == 9'h022);
      check("eep", nchars[4] == 9'h101);
    end
    check("time", n_time == 1 && times.size() == 1 && times[0] == 8'h15);
    check("no errors", n_par == 0 && n_esc == 0 && n_empty == 0);
    // 3: empty packet
    clear();
    e = new; e.nul(); e.data(8'h01); e.eop(); e.eep();
    send(e);
    check($sformatf("empty packet %0d", n_empty), n_empty == 1 && n_par == 0);
    // 4: escape error
    clear();
    e = new; e.nul(); e.esc(); e.eop();
    send(e);
    check($sformatf("escape error %0d", n_esc), n_esc == 1 && n_par == 0);
    // 5: parity error
    clear();
    e = new; e.nul(); e.data(8'h33); e.bad_parity_data(8'h44);
    send(e);
    check($sformatf("parity error %0d", n_par), n_par == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
