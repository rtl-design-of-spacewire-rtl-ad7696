// tb_spw_codec: two link interfaces (IP1, IP2) wired to each other, plus one
// in loop-back (its Dout/Sout fed to its own Din/Sin).
//  - loop-back: the link comes up alone and passes its own data;
//  - IP1/IP2 duplex: IP1 sends 10 20 30 40 50 EOP, IP2 sends 50 40 30 20 10
//    EEP; both arrive in order; a time code goes each way;
//  - flow control: IP2 stops reading, IP1 sends 200 N-Chars; IP1 stalls once
//    the FIFO credit (128 places) is used, and resumes when IP2 reads;
//  - error recovery: the IP1->IP2 wires are held still; IP2 reports a
//    disconnect link error, both ends go through ErrorReset and reconnect.
// Start-up time is checked against 6.4 + 12.8 us plus the NULL/FCT exchange.
module tb_spw_codec;
  import spw_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // three codecs: index 0 = IP1, 1 = IP2, 2 = loop-back
  logic       link_start[3], autostart[3], link_disable[3];
  logic [7:0] tx_div[3];
  spw_state_e state[3];
  logic       link_error[3], err_credit[3], err_par[3], err_esc[3], err_disc[3], err_empty[3], err_invalid[3];
  logic       tx_wr[3], tx_ready[3], rx_rd[3], rx_valid[3], tick_in[3], tick_out[3];
  nchar_t     tx_data[3], rx_data[3];
  logic [7:0] time_in[3], time_out[3];
  logic       din[3], sin[3], dout[3], sout[3];
  logic       cut;

  for (genvar i = 0; i < 3; i++) begin : g_ip
    spw_codec u (
      .clk, .rst_n, .link_start(link_start[i]), .link_disable(link_disable[i]), .autostart(autostart[i]),
      .tx_div(tx_div[i]), .state(state[i]), .link_error(link_error[i]), .err_credit(err_credit[i]),
      .err_par(err_par[i]), .err_esc(err_esc[i]), .err_disc(err_disc[i]), .err_empty(err_empty[i]), .err_invalid(err_invalid[i]),
      .tx_wr(tx_wr[i]), .tx_data(tx_data[i]), .tx_ready(tx_ready[i]),
      .rx_rd(rx_rd[i]), .rx_data(rx_data[i]), .rx_valid(rx_valid[i]),
      .tick_in(tick_in[i]), .time_in(time_in[i]), .tick_out(tick_out[i]), .time_out(time_out[i]),
      .din(din[i]), .sin(sin[i]), .dout(dout[i]), .sout(sout[i]));
  end

  logic cut_d, cut_s;
  always_ff @(posedge clk) if (!cut) begin cut_d <= dout[0]; cut_s <= sout[0]; end
  assign din[1] = cut ? cut_d : dout[0];
  assign sin[1] = cut ? cut_s : sout[0];
  assign din[0] = dout[1];
  assign sin[0] = sout[1];
  assign din[2] = dout[2];
  assign sin[2] = sout[2];

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    #10000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receivers: collect what each end reads
  nchar_t got[3][$];
  logic   reading[3];
  logic [7:0] tgot[3][$];
  int lerr[3];
  for (genvar i = 0; i < 3; i++) begin : g_mon
    assign rx_rd[i] = reading[i] && rx_valid[i];
    always @(posedge clk) if (rst_n) begin
      if (rx_rd[i]) got[i].push_back(rx_data[i]);
      if (tick_out[i]) tgot[i].push_back(time_out[i]);
      if (link_error[i]) lerr[i]++;
    end
  end

  task automatic send(int i, nchar_t c);
    tx_data[i] = c; tx_wr[i] = 1;
    @(negedge clk);
    while (!tx_ready[i]) @(negedge clk);  // tx_ready was high at the edge -> accepted
    tx_wr[i] = 0;
  endtask

  task automatic wait_run(int i, int max, output int n);
    n = 0;
    while (state[i] != ST_RUN && n < max) begin @(negedge clk); n++; end
  endtask

  initial begin
    int n;
    cut = 0;
    for (int i = 0; i < 3; i++) begin
      link_start[i] = 0; autostart[i] = 0; link_disable[i] = 0; tx_div[i] = 5;
      tx_wr[i] = 0; tx_data[i] = 0; tick_in[i] = 0; time_in[i] = 0; reading[i] = 1; lerr[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // IP1 and loop-back started by the host, IP2 by autostart
    link_start[0] = 1; link_start[2] = 1; autostart[1] = 1;
    wait_run(2, 5000, n);
    check($sformatf("loop-back Run after %0d cycles", n), state[2] == ST_RUN && n >= 960 && n < 1200);
    wait_run(0, 5000, n);
    check("IP1 Run", state[0] == ST_RUN);
    wait_run(1, 5000, n);
    check("IP2 Run", state[1] == ST_RUN);
    // loop-back data
    send(2, 9'h0AB); send(2, 9'h0CD); send(2, NCHAR_EOP);
    // duplex transfer
    fork
      begin send(0, 9'h010); send(0, 9'h020); send(0, 9'h030); send(0, 9'h040); send(0, 9'h050); send(0, NCHAR_EOP); end
      begin send(1, 9'h050); send(1, 9'h040); send(1, 9'h030); send(1, 9'h020); send(1, 9'h010); send(1, NCHAR_EEP); end
    join
    time_in[0] = 8'h07; tick_in[0] = 1; time_in[1] = 8'hC3; tick_in[1] = 1;
    @(negedge clk); tick_in[0] = 0; tick_in[1] = 0;
    repeat (1500) @(negedge clk);
    check("loop-back data", got[2].size() == 3 && got[2][0] == 9'h0AB && got[2][1] == 9'h0CD && got[2][2] == NCHAR_EOP);
    check($sformatf("IP2 got %0d", got[1].size()), got[1].size() == 6);
    if (got[1].size() == 6) check("IP2 data", got[1][0] == 9'h010 && got[1][1] == 9'h020 && got[1][2] == 9'h030 &&
                                   got[1][3] == 9'h040 && got[1][4] == 9'h050 && got[1][5] == NCHAR_EOP);
    check($sformatf("IP1 got %0d", got[0].size()), got[0].size() == 6);
    if (got[0].size() == 6) check("IP1 data", got[0][0] == 9'h050 && got[0][4] == 9'h010 && got[0][5] == NCHAR_EEP);
    check("time IP1->IP2", tgot[1].size() == 1 && tgot[1][0] == 8'h07);
    check("time IP2->IP1", tgot[0].size() == 1 && tgot[0][0] == 8'hC3);
    // flow control: IP2 stops reading
    got[1] = {};
    reading[1] = 0;
    for (int k = 0; k < 200; k++) begin tx_data[0] = 9'(k % 256); tx_wr[0] = 1; @(negedge clk); while (!tx_ready[0]) @(negedge clk); end
    tx_wr[0] = 0;
    repeat (8000) @(negedge clk);
    // FCTs grant 8 places at a time, so up to 7 free places stay unpromised
    check($sformatf("stalled near the receive FIFO size (%0d stored)", g_ip[1].u.u_rx_fifo.u_fifo.count),
          g_ip[1].u.u_rx_fifo.u_fifo.count > 120 && g_ip[1].u.u_rx_fifo.u_fifo.count <= 128);
    check("credit used up", g_ip[0].u.tx_credit == 0 && g_ip[1].u.rx_credit == 0);
    check("IP1 holds the rest", !g_ip[0].u.u_tx_fifo.empty);
    check("no credit error", lerr[0] == 0 && lerr[1] == 0);
    reading[1] = 1;
    repeat (6000) @(negedge clk);
    check($sformatf("all 200 delivered (%0d)", got[1].size()), got[1].size() == 200);
    for (int k = 0; k < got[1].size(); k++) if (got[1][k] != 9'(k % 256)) begin check("order", 0); break; end
    // disconnect IP1 -> IP2
    cut = 1;
    repeat (200) @(negedge clk);
    check("IP2 disconnect reported", lerr[1] == 1);
    check("IP2 left Run", state[1] != ST_RUN);
    cut = 0;
    repeat (200) @(negedge clk);
    check("IP1 sees the silence", lerr[0] == 1);
    wait_run(0, 10000, n);
    wait_run(1, 10000, n);
    check("reconnected", state[0] == ST_RUN && state[1] == ST_RUN);
    got[1] = {};
    send(0, 9'h077); send(0, NCHAR_EOP);
    repeat (500) @(negedge clk);
    check("data after reconnect", got[1].size() == 2 && got[1][0] == 9'h077);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
