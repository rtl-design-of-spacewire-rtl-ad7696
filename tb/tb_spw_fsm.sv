// tb_spw_fsm: drives the exchange-level state machine (with its timer at
// 50 MHz) through every transition of the state diagram: the 6.4 us and
// 12.8 us delays, the Started and Connecting timeouts, the NULL/FCT
// handshake, link start and autostart, character sequence errors, receiver,
// credit and empty-packet errors and link disable; checks the transmitter and
// receiver enables in each state and that only errors in Run are reported
// as link errors.
module tb_spw_fsm;
  import spw_pkg::*;
  logic clk = 0, rst_n = 0;
  logic link_start, link_disable, autostart, got_null, got_fct, got_nchar, null_sent;
  logic rx_err, credit_err, empty_err, after_6u4, after_12u8, timer_restart;
  logic enable_tx, send_null, send_fct, send_nchar, enable_rx, link_error;
  spw_state_e state;
  int checks = 0, failures = 0, n_lerr = 0;

  spw_fsm dut (.*);
  spw_timer u_timer (.clk, .rst_n, .restart(timer_restart), .after_6u4, .after_12u8);
  always #10 clk = ~clk;
  always @(posedge clk) if (rst_n && link_error) n_lerr++;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s state=%s t=%0t", what, state.name(), $time); end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycles until state == s (or -1)
  task automatic wait_state(spw_state_e s, int max, output int n);
    n = 0;
    while (state != s && n < max) begin @(negedge clk); n++; end
    if (state != s) n = -1;
  endtask

  task automatic pulse(ref logic sig);
    sig = 1; @(negedge clk); sig = 0; @(negedge clk);
  endtask

  task automatic outputs(logic tx, logic fct, logic nc, logic rx);
    check("enable_tx", enable_tx == tx);
    check("send_null", send_null == tx);
    check("send_fct", send_fct == fct);
    check("send_nchar", send_nchar == nc);
    check("enable_rx", enable_rx == rx);
  endtask

  // from ErrorReset (just entered) to Ready, checking both delays
  task automatic to_ready();
    int n;
    check("in ErrorReset", state == ST_ERROR_RESET);
    outputs(0, 0, 0, 0);
    wait_state(ST_ERROR_WAIT, 1000, n);
    check($sformatf("6.4 us -> %0d cycles", n), n >= 318 && n <= 322);
    outputs(0, 0, 0, 1);
    wait_state(ST_READY, 1000, n);
    check($sformatf("12.8 us -> %0d cycles", n), n >= 638 && n <= 642);
    outputs(0, 0, 0, 1);
  endtask

  initial begin
    int n;
    {link_start, link_disable, autostart, got_null, got_fct, got_nchar, null_sent} = '0;
    {rx_err, credit_err, empty_err} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    to_ready();
    // Ready waits for the link to be enabled
    repeat (2000) @(negedge clk);
    check("stays in Ready", state == ST_READY);
    // FCT in Ready: character sequence error
    pulse(got_fct);
    check("FCT in Ready -> ErrorReset", state == ST_ERROR_RESET);
    to_ready();
    // start, no NULL received: 12.8 us timeout in Started
    link_start = 1;
    @(negedge clk); @(negedge clk);
    check("Started", state == ST_STARTED);
    outputs(1, 0, 0, 1);
    wait_state(ST_ERROR_RESET, 1000, n);
    check($sformatf("Started timeout %0d", n), n >= 636 && n <= 642);
    // NULL received already in ErrorWait, kept until Started
    @(negedge clk);
    wait_state(ST_ERROR_WAIT, 1000, n);
    pulse(got_null);
    wait_state(ST_STARTED, 2000, n);
    check("Started again", n >= 0);
    repeat (5) @(negedge clk);
    check("waits for a NULL to be sent", state == ST_STARTED);
    pulse(null_sent);
    @(negedge clk);
    check("Connecting", state == ST_CONNECTING);
    outputs(1, 1, 0, 1);
    wait_state(ST_ERROR_RESET, 1000, n);
    check($sformatf("Connecting timeout %0d", n), n >= 630 && n <= 642);
    // N-Char in Connecting: error
    to_ready();
    pulse(got_null); pulse(null_sent);
    check("Connecting 2", state == ST_CONNECTING);
    pulse(got_nchar);
    check("N-Char in Connecting -> ErrorReset", state == ST_ERROR_RESET);
    // full handshake to Run
    to_ready();
    pulse(got_null); pulse(null_sent); pulse(got_fct);
    check("Run", state == ST_RUN);
    outputs(1, 1, 1, 1);
    check("no link error yet", n_lerr == 0);
    repeat (3000) @(negedge clk);
    check("Run holds", state == ST_RUN);
    pulse(credit_err);
    check("credit error -> ErrorReset", state == ST_ERROR_RESET);
    check("reported", n_lerr == 1);
    to_ready();
    pulse(got_null); pulse(null_sent); pulse(got_fct);
    pulse(empty_err);
    check("empty packet -> ErrorReset", state == ST_ERROR_RESET && n_lerr == 2);
    to_ready();
    pulse(got_null); pulse(null_sent); pulse(got_fct);
    pulse(rx_err);
    check("rx error -> ErrorReset", state == ST_ERROR_RESET && n_lerr == 3);
    to_ready();
    pulse(got_null); pulse(null_sent); pulse(got_fct);
    link_disable = 1; @(negedge clk); @(negedge clk);
    check("disable -> ErrorReset, not reported", state == ST_ERROR_RESET && n_lerr == 3);
    to_ready();
    repeat (100) @(negedge clk);
    check("disabled stays Ready", state == ST_READY);
    // rx error in ErrorWait before any NULL: not reported
    // autostart: Ready waits for a NULL
    link_disable = 0; link_start = 0; autostart = 1;
    repeat (100) @(negedge clk);
    check("autostart waits", state == ST_READY);
    pulse(got_null);
    check("autostart on NULL", state == ST_STARTED);
    pulse(rx_err);
    check("rx error in Started, not reported", state == ST_ERROR_RESET && n_lerr == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
