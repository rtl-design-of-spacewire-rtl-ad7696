// tb_spw_ahb_slave: AHB master model against the SpaceWire AHB slave, with
// a model of the link interface's host side. Checks: the Idle/Write/Read
// state sequence; writes of the data port reaching the link in order
// (single and pipelined bursts); a write to the full Tx AHB FIFO dropped and
// flagged; reads returning received N-Chars with the valid bit and 0 when
// empty; control, time-code and status registers; sticky flags and their
// clearing; HREADY always high and HRESP OKAY.
module tb_spw_ahb_slave;
  import ahb_pkg::*;
  import spw_pkg::*;
  logic clk = 0, rst_n = 0;
  ahb_slv_in_t  ahbsi;
  ahb_slv_out_t ahbso;
  logic irq, tx_wr, tx_ready, rx_rd, rx_valid, link_start, link_disable, autostart, tick_in, tick_out, link_error;
  nchar_t tx_data, rx_data;
  logic [7:0] tx_div, time_in, time_out;
  logic [5:0] errs;
  spw_state_e state;
  int checks = 0, failures = 0;

  spw_ahb_slave dut (.*);
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

  // link-side models
  nchar_t sent[$], rxq[$];
  int ticks = 0; logic [7:0] last_tick;
  assign rx_valid = rxq.size() != 0;
  assign rx_data  = rxq.size() != 0 ? rxq[0] : '0;
  always @(posedge clk) if (rst_n) begin
    if (tx_wr) sent.push_back(tx_data);
    if (tick_in) begin ticks++; last_tick = time_in; end
  end
  // pop after the edge so the slave samples rx_data before it changes
  always @(posedge clk) if (rst_n && rx_rd) begin #1; void'(rxq.pop_front()); end
  int bad_ready = 0;
  always @(negedge clk) if (rst_n && (!ahbso.hready || ahbso.hresp != HRESP_OKAY)) bad_ready++;

  // AHB master: single transfers
  task automatic ahb_write(logic [31:0] a, logic [31:0] d);
    ahbsi.hsel = 1; ahbsi.htrans = HTRANS_NONSEQ; ahbsi.hwrite = 1; ahbsi.haddr = a;
    @(negedge clk);
    ahbsi.hsel = 0; ahbsi.htrans = HTRANS_IDLE; ahbsi.hwdata = d;
    @(negedge clk);
  endtask
  task automatic ahb_read(logic [31:0] a, output logic [31:0] d);
    ahbsi.hsel = 1; ahbsi.htrans = HTRANS_NONSEQ; ahbsi.hwrite = 0; ahbsi.haddr = a;
    @(negedge clk);
    ahbsi.hsel = 0; ahbsi.htrans = HTRANS_IDLE;
    d = ahbso.hrdata;
    @(negedge clk);
  endtask

  localparam logic [31:0] BASE = 32'hFFF00700;

  initial begin
    logic [31:0] d;
    logic [31:0] vals[8] = '{32'h80, 32'h70, 32'h60, 32'h50, 32'h50, 32'h40, 32'h30, 32'h20};
    ahbsi = '0; ahbsi.hready = 1; ahbsi.hsize = 3'b010;
    tx_ready = 1; tick_out = 0; time_out = 0; state = ST_READY; link_error = 0; errs = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset divider", tx_div == 8'd5 && !link_start);
    // state sequence of one write
    ahbsi.hsel = 1; ahbsi.htrans = HTRANS_NONSEQ; ahbsi.hwrite = 1; ahbsi.haddr = BASE;
    check("Idle", dut.st == dut.S_IDLE);
    @(negedge clk);
    check("Write", dut.st == dut.S_WRITE);
    ahbsi.hsel = 0; ahbsi.htrans = HTRANS_IDLE; ahbsi.hwdata = 32'h99;
    @(negedge clk);
    check("back to Idle", dut.st == dut.S_IDLE);
    // the eight words of the processor test, at consecutive addresses
    foreach (vals[i]) ahb_write(BASE + 32'(4 * i), vals[i]);
    repeat (3) @(negedge clk);
    check($sformatf("9 words to link (%0d)", sent.size()), sent.size() == 9);
    if (sent.size() == 9) begin
      check("first", sent[0] == 9'h099);
      foreach (vals[i]) check($sformatf("word %0d", i), sent[i+1] == 9'(vals[i]));
    end
    // pipelined burst: 4 SEQ writes back to back
    sent = {};
    for (int i = 0; i < 5; i++) begin
      if (i < 4) begin
        ahbsi.hsel = 1; ahbsi.htrans = (i == 0) ? HTRANS_NONSEQ : HTRANS_SEQ; ahbsi.hwrite = 1;
        ahbsi.haddr = BASE + 32'(4 * i);
      end else begin
        ahbsi.hsel = 0; ahbsi.htrans = HTRANS_IDLE;
      end
      if (i > 0) ahbsi.hwdata = 32'(9'h100 + (i - 1));
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check("burst", sent.size() == 4 && sent[0] == 9'h100 && sent[3] == 9'h103);
    // overflow: link not ready, 17 writes into a 16-deep FIFO
    sent = {};
    tx_ready = 0;
    for (int i = 0; i < 17; i++) ahb_write(BASE, 32'(i));
    ahb_read(BASE + 32'h40, d);
    check("overflow flagged", d[5] == 1'b1 && d[3] == 1'b1);
    tx_ready = 1;
    repeat (20) @(negedge clk);
    check($sformatf("16 kept (%0d)", sent.size()), sent.size() == 16 && sent[15] == 9'd15);
    ahb_write(BASE + 32'h40, 0);
    ahb_read(BASE + 32'h40, d);
    check("overflow cleared", d[5] == 1'b0);
    // reads
    ahb_read(BASE, d);
    check("empty read", d == 0);
    rxq.push_back(9'h011); rxq.push_back(9'h022); rxq.push_back(NCHAR_EOP);
    repeat (5) @(negedge clk);
    check("irq on data", irq);
    ahb_read(BASE, d); check("read 1", d == 32'h8000_0011);
    ahb_read(BASE + 4, d); check("read 2", d == 32'h8000_0022);
    ahb_read(BASE + 8, d); check("read EOP", d == 32'h8000_0100);
    ahb_read(BASE, d); check("read empty again", d == 0);
    check("irq off", !irq);
    // control register
    ahb_write(BASE + 32'h44, 32'h0000_0A03);
    check("control out", link_start && autostart && !link_disable && tx_div == 8'h0A);
    ahb_read(BASE + 32'h44, d);
    check("control read", d == 32'h0000_0A03);
    // time code
    ahb_write(BASE + 32'h48, 32'h0000_002B);
    @(negedge clk);
    check("time code", ticks == 1 && last_tick == 8'h2B);
    // status: state, time received, link error, receiver errors
    state = ST_RUN;
    @(negedge clk); time_out = 8'h3C; tick_out = 1; @(negedge clk); tick_out = 0;
    link_error = 1; errs = 6'b000010; @(negedge clk); link_error = 0; errs = '0;
    ahb_read(BASE + 32'h40, d);
    check($sformatf("status %h", d), d[2:0] == 3'(ST_RUN) && d[6] && d[7] && d[15:8] == 8'h3C && d[20:16] == 5'b00010);
    check("irq on link error", irq);
    ahb_write(BASE + 32'h40, 0);
    ahb_read(BASE + 32'h40, d);
    check("sticky cleared", !d[6] && !d[7] && d[20:16] == 0);
    check("zero wait states, OKAY", bad_ready == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
