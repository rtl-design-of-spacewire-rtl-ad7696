// tb_spw_ahb_top: end-to-end test of complete nodes, each an spw_ahb_top at
// its default parameters driven by an AHB master model: IP1 and IP2 connected
// by their SpaceWire links, and IP3 wired to itself. Runs, in order:
//  1. link start-up: IP1 by link start, IP2 by autostart;
//  2. the processor test: IP1 writes 80 70 60 50 50 40 30 20 and EOP to
//     consecutive data-port addresses from 0xFFF00700; IP2 reads them;
//  3. duplex: IP1 sends 10..50 EOP while IP2 sends 50..10 EEP;
//  4. a time code each way;
//  5. flow-control stall: IP2 stops reading while IP1 sends N-Chars until it backs up;
//     IP1's Tx AHB FIFO fills; one more write overflows and is flagged;
//     IP2 then reads them all in order;
//  6. rate switch: IP1's bit period changed from 5 to 10 clocks;
//  7. a corrupted bit on the IP1->IP2 wire in the middle of a packet: IP2
//     detects a receiver error, reports a link error, closes the cut packet
//     with an EEP, and the link recovers;
//  8. cable cut (IP1->IP2 wires frozen): IP2 reports a disconnect error and
//     the link recovers; then link disable on IP1: IP2 reports a link error,
//     IP1 stays down, and re-enabling reconnects;
//  9. an invalid host character: IP1 drops and flags it and sends no more
//     N-Chars until its link is restarted.
// 10. a third node looped back to itself runs the processor test, reading
//     each word back from the address it was written to.
// The start-up time from Started to Run is also checked.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_spw_ahb_top;
  import ahb_pkg::*;
  import spw_pkg::*;
  logic clk = 0, rst_n = 0;
  ahb_slv_in_t  ahbsi[3];
  ahb_slv_out_t ahbso[3];
  logic irq[3], din[3], sin[3], dout[3], sout[3];
  spw_state_e st[3];
  logic flip, cut;
  logic d_held, s_held;  // wire levels frozen while the cable is cut
  int checks = 0, failures = 0;

  spw_ahb_top ip1 (.clk, .rst_n, .ahbsi(ahbsi[0]), .ahbso(ahbso[0]), .irq(irq[0]), .link_state(st[0]),
                   .din(din[0]), .sin(sin[0]), .dout(dout[0]), .sout(sout[0]));
  spw_ahb_top ip2 (.clk, .rst_n, .ahbsi(ahbsi[1]), .ahbso(ahbso[1]), .irq(irq[1]), .link_state(st[1]),
                   .din(din[1]), .sin(sin[1]), .dout(dout[1]), .sout(sout[1]));

  assign din[1] = cut ? d_held : dout[0] ^ flip;
  assign sin[1] = cut ? s_held : sout[0];
  assign din[0] = dout[1];
  assign sin[0] = sout[1];
  // a third node with its output wired back to its own input (loop-back mode)
  spw_ahb_top ip3 (.clk, .rst_n, .ahbsi(ahbsi[2]), .ahbso(ahbso[2]), .irq(irq[2]), .link_state(st[2]),
                   .din(din[2]), .sin(sin[2]), .dout(dout[2]), .sout(sout[2]));
  assign din[2] = dout[2];
  assign sin[2] = sout[2];

  always #10 clk = ~clk;  // 50 MHz

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #20000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit same(logic [8:0] a[$], logic [8:0] b[$]);
    if (a.size() != b.size()) return 0;
    foreach (a[k]) if (a[k] != b[k]) return 0;
    return 1;
  endfunction

  localparam logic [31:0] BASE = 32'hFFF00700;
  localparam logic [31:0] STATUS = BASE + 32'h40, CONTROL = BASE + 32'h44, TIMEC = BASE + 32'h48;

  task automatic ahb_write(int i, logic [31:0] a, logic [31:0] d);
    ahbsi[i].hsel = 1; ahbsi[i].htrans = HTRANS_NONSEQ; ahbsi[i].hwrite = 1; ahbsi[i].haddr = a;
    @(negedge clk);
    ahbsi[i].hsel = 0; ahbsi[i].htrans = HTRANS_IDLE; ahbsi[i].hwdata = d;
    @(negedge clk);
  endtask
  task automatic ahb_read(int i, logic [31:0] a, output logic [31:0] d);
    ahbsi[i].hsel = 1; ahbsi[i].htrans = HTRANS_NONSEQ; ahbsi[i].hwrite = 0; ahbsi[i].haddr = a;
    @(negedge clk);
    ahbsi[i].hsel = 0; ahbsi[i].htrans = HTRANS_IDLE;
    d = ahbso[i].hrdata;
    @(negedge clk);
  endtask
  task automatic wait_run(int i, int max);
    logic [31:0] d;
    int n;
    n = 0;
    do begin ahb_read(i, STATUS, d); n++; end while (d[2:0] != 3'(ST_RUN) && n < max);
  endtask
  // read n valid words from the data port
  task automatic read_words(int i, int n, ref logic [8:0] q[$], input int max);
    logic [31:0] d;
    int tries;
    tries = 0;
    while (q.size() < n && tries < max) begin
      ahb_read(i, BASE + 32'(4 * (q.size() % 16)), d);
      if (d[31]) q.push_back(d[8:0]);
      tries++;
    end
  endtask

  // mechanism counters
  int m_start = 0, m_packet = 0, m_duplex = 0, m_time = 0, m_stall = 0, m_overflow = 0;
  int m_rate = 0, m_rxerr = 0, m_disc = 0, m_invalid = 0, m_eep = 0, m_loop = 0;

  // bit period monitor on IP1's output
  int last_edge = 0, period = 0, cyc = 0;
  logic pd = 0, ps = 0;
  always @(posedge clk) begin
    cyc++;
    if (dout[0] != pd || sout[0] != ps) begin period = cyc - last_edge; last_edge = cyc; end
    pd = dout[0]; ps = sout[0];
  end

  // start-up latency: IP1 entering Started to both ends in Run
  int t_started = -1, t_run0 = -1, t_run1 = -1;
  always @(posedge clk) if (rst_n) begin
    if (t_started < 0 && st[0] == ST_STARTED) t_started = cyc;
    if (t_run0 < 0 && st[0] == ST_RUN) t_run0 = cyc;
    if (t_run1 < 0 && st[1] == ST_RUN) t_run1 = cyc;
  end

  initial begin
    logic [31:0] d;
    logic [8:0] q[$];
    logic [8:0] exp1[$];
    ahbsi[0] = '0; ahbsi[1] = '0; ahbsi[2] = '0;
    ahbsi[0].hready = 1; ahbsi[1].hready = 1; ahbsi[2].hready = 1; flip = 0; cut = 0; d_held = 0; s_held = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. start-up
    ahb_write(0, CONTROL, 32'h0000_0501);
    ahb_write(1, CONTROL, 32'h0000_0502);
    wait_run(0, 2000); wait_run(1, 2000);
    check("both in Run", st[0] == ST_RUN && st[1] == ST_RUN);
    if (st[0] == ST_RUN && st[1] == ST_RUN) m_start++;
    // two NULLs and an FCT at 10 Mbit/s take 2 us; allow the synchroniser and
    // decode latency and one NULL already in flight: both in Run within 3.5 us
    $display("start-up: Started->Run %0d ns (IP1), %0d ns (IP2)", 20 * (t_run0 - t_started), 20 * (t_run1 - t_started));
    check("start-up time", t_started >= 0 && t_run0 > t_started && t_run1 > t_started &&
          20 * (t_run0 - t_started) <= 3500 && 20 * (t_run1 - t_started) <= 3500);
    // 2. processor test pattern
    exp1 = '{9'h080, 9'h070, 9'h060, 9'h050, 9'h050, 9'h040, 9'h030, 9'h020, 9'h100};
    foreach (exp1[k]) ahb_write(0, BASE + 32'(4 * k), 32'(exp1[k]));
    q = {};
    read_words(1, 9, q, 3000);
    check($sformatf("packet received (%0d)", q.size()), same(q, exp1));
    if (same(q, exp1)) m_packet++;
    // 3. duplex
    fork
      begin
        logic [8:0] a[6] = '{9'h010, 9'h020, 9'h030, 9'h040, 9'h050, 9'h100};
        foreach (a[k]) ahb_write(0, BASE, 32'(a[k]));
      end
      begin
        logic [8:0] b[6] = '{9'h050, 9'h040, 9'h030, 9'h020, 9'h010, 9'h101};
        foreach (b[k]) ahb_write(1, BASE, 32'(b[k]));
      end
    join
    begin
      logic [8:0] q1[$], q2[$];
      read_words(1, 6, q2, 3000);
      read_words(0, 6, q1, 3000);
      check("IP1 -> IP2", same(q2, '{9'h010, 9'h020, 9'h030, 9'h040, 9'h050, 9'h100}));
      check("IP2 -> IP1", same(q1, '{9'h050, 9'h040, 9'h030, 9'h020, 9'h010, 9'h101}));
      if (q2.size() == 6 && q1.size() == 6) m_duplex++;
    end
    // 4. time codes
    ahb_write(0, TIMEC, 32'h15);
    ahb_write(1, TIMEC, 32'h2A);
    repeat (300) @(negedge clk);
    ahb_read(1, STATUS, d);
    check("time at IP2", d[7] && d[15:8] == 8'h15);
    if (d[7]) m_time++;
    ahb_read(0, STATUS, d);
    check("time at IP1", d[7] && d[15:8] == 8'h2A);
    if (d[7]) m_time++;
    // 5. stall: IP2 does not read; IP1 writes until its Tx AHB FIFO stays full
    begin
      int k, full_run;
      k = 0; full_run = 0;
      while (full_run < 100 && k < 600) begin
        ahb_read(0, STATUS, d);
        if (d[3]) begin full_run++; repeat (20) @(negedge clk); end
        else begin full_run = 0; ahb_write(0, BASE, 32'(k & 8'hFF)); k++; end  // data characters only
      end
      ahb_read(0, STATUS, d);
      check($sformatf("Tx AHB FIFO full while far end stalls (%0d written)", k), d[3] && k > 256);
      if (d[3]) m_stall++;
      ahb_write(0, BASE, 32'h0FF);   // dropped
      ahb_read(0, STATUS, d);
      check("overflow flagged", d[5]);
      if (d[5]) m_overflow++;
      ahb_write(0, STATUS, 0);
      q = {};
      read_words(1, k, q, 20 * k);
      check($sformatf("%0d after stall (%0d)", k, q.size()), q.size() == k);
      for (int j = 0; j < q.size(); j++) if (q[j] != 9'(j & 8'hFF)) begin check($sformatf("order %0d", j), 0); break; end
      repeat (500) @(negedge clk);
      ahb_read(1, BASE, d);
      check("dropped word not sent", !d[31]);
    end
    // 6. rate switch
    check($sformatf("bit period 5 (%0d)", period), period == 5);
    ahb_write(0, CONTROL, 32'h0000_0A01);
    repeat (200) @(negedge clk);
    check($sformatf("bit period 10 (%0d)", period), period == 10);
    if (period == 10) m_rate++;
    ahb_write(0, BASE, 32'h5A); ahb_write(0, BASE, 32'h100);
    q = {};
    read_words(1, 2, q, 2000);
    check("data at the new rate", same(q, '{9'h05A, 9'h100}));
    // 7. corrupted bit, in the middle of a packet (no EOP yet)
    ahb_write(1, STATUS, 0);
    ahb_write(0, STATUS, 0);
    ahb_write(0, BASE, 32'h11); ahb_write(0, BASE, 32'h22);
    repeat (400) @(negedge clk);
    flip = 1; repeat (10) @(negedge clk); flip = 0;
    repeat (200) @(negedge clk);
    ahb_read(1, STATUS, d);
    check($sformatf("receiver error seen %b", d[20:16]), d[6] && d[20:16] != 0);
    if (d[6]) m_rxerr++;
    check("irq", irq[1]);
    wait_run(0, 3000); wait_run(1, 3000);
    check("recovered", st[0] == ST_RUN && st[1] == ST_RUN);
    q = {};
    read_words(1, 3, q, 2000);
    check("cut packet closed with EEP", same(q, '{9'h011, 9'h022, 9'h101}));
    if (same(q, '{9'h011, 9'h022, 9'h101})) m_eep++;
    // 8. cable cut: IP1->IP2 wires freeze, IP2 must report a disconnect
    ahb_write(1, STATUS, 0);
    d_held = dout[0]; s_held = sout[0]; cut = 1;
    repeat (300) @(negedge clk);
    ahb_read(1, STATUS, d);
    check($sformatf("disconnect at IP2 %h", d), d[6] && d[16]);
    if (d[6] && d[16]) m_disc++;
    cut = 0;
    wait_run(0, 3000); wait_run(1, 3000);
    check("reconnected after cut", st[0] == ST_RUN && st[1] == ST_RUN);
    // link disable on IP1: IP2 reports a link error, IP1 stays down
    ahb_write(1, STATUS, 0);
    ahb_write(0, CONTROL, 32'h0000_0A04);
    repeat (300) @(negedge clk);
    ahb_read(1, STATUS, d);
    check($sformatf("link error at IP2 after disable %h", d), d[6]);
    check("IP1 held", st[0] != ST_RUN);
    ahb_write(0, CONTROL, 32'h0000_0A01);
    wait_run(0, 3000); wait_run(1, 3000);
    check("reconnected", st[0] == ST_RUN && st[1] == ST_RUN);
    ahb_write(0, BASE, 32'h33); ahb_write(0, BASE, 32'h100);
    q = {};
    read_words(1, 2, q, 2000);
    check("data after reconnect", same(q, '{9'h033, 9'h100}));
    // 9. invalid host character: dropped, flagged, N-Chars halted until the
    //    link is restarted
    ahb_write(0, STATUS, 0);
    ahb_write(0, BASE, 32'h1FE); ahb_write(0, BASE, 32'h44); ahb_write(0, BASE, 32'h100);
    repeat (500) @(negedge clk);
    ahb_read(0, STATUS, d);
    check($sformatf("invalid character flagged %h", d), d[21] && d[2:0] == 3'(ST_RUN));
    if (d[21]) begin
      ahb_read(1, BASE, d);
      check("nothing sent after the invalid character", !d[31]);
      if (!d[31]) m_invalid++;
    end
    ahb_write(0, CONTROL, 32'h0000_0A04);
    repeat (50) @(negedge clk);
    ahb_write(0, CONTROL, 32'h0000_0A01);
    wait_run(0, 3000); wait_run(1, 3000);
    q = {};
    read_words(1, 2, q, 3000);
    check("held N-Chars sent after restart", same(q, '{9'h044, 9'h100}));
    // 10. loop-back node running the processor test: each word written is
    //     read back from the same address once it has gone round the loop
    ahb_write(2, CONTROL, 32'h0000_0501);
    wait_run(2, 3000);
    check("loop-back node in Run", st[2] == ST_RUN);
    begin
      int ok;
      ok = 0;
      foreach (exp1[k]) begin
        ahb_write(2, BASE + 32'(4 * k), 32'(exp1[k]));
        repeat (200) @(negedge clk);
        ahb_read(2, BASE + 32'(4 * k), d);
        check($sformatf("loop-back read %0d: %h", k, d), d == {1'b1, 22'b0, exp1[k]});
        if (d == {1'b1, 22'b0, exp1[k]}) ok++;
      end
      if (ok == exp1.size()) m_loop++;
    end
    $display("mechanisms: start=%0d packet=%0d duplex=%0d time=%0d stall=%0d overflow=%0d rate=%0d rxerr=%0d disconnect=%0d invalid=%0d eep=%0d loopback=%0d",
             m_start, m_packet, m_duplex, m_time, m_stall, m_overflow, m_rate, m_rxerr, m_disc, m_invalid, m_eep, m_loop);
    check("start", m_start > 0); check("packet", m_packet > 0); check("duplex", m_duplex > 0);
    check("time", m_time > 0); check("stall", m_stall > 0); check("overflow", m_overflow > 0);
    check("rate", m_rate > 0); check("rxerr", m_rxerr > 0); check("disconnect", m_disc > 0);
    check("invalid", m_invalid > 0); check("eep", m_eep > 0); check("loopback", m_loop > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
