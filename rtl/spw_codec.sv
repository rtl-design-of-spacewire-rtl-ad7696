// spw_codec: SpaceWire link interface (encoder/decoder).
//
// One end of a SpaceWire link: it sends and receives packets of N-Chars
// (data bytes, EOP, EEP) and time codes over the four DS wires (Din/Sin in,
// Dout/Sout out) and handles link start-up, flow control and error recovery.
// Parts: transmit clock divider (spw_tx_clock), transmitter (spw_tx),
// receive clock recovery and disconnect detection (spw_rx_clkrec), receiver
// (spw_rx), exchange-level state machine (spw_fsm) with its 6.4/12.8 us timer
// (spw_timer), transmit FIFO (spw_fifo), receive FIFO with credit
// (spw_rx_fifo) and the time-code buffer (spw_time_buf).
//
// Flow control: the receive FIFO offers an FCT each time it has 8 free places
// not yet promised; the transmitter sends it and the far end may then send 8
// more N-Chars. FCTs received raise the transmitter's credit by 8.
// Host interface (all synchronous to clk): tx_wr/tx_data push an N-Char
// (bit 8 = control flag; EOP = 9'h100, EEP = 9'h101) while tx_ready is high;
// rx_valid/rx_data show the oldest received N-Char and rx_rd pops it;
// tick_in/time_in send a time code, tick_out/time_out report one received.
// link_start, autostart and link_disable control the link; state shows the
// exchange-level state and link_error pulses on an error in Run.
// Timing: the link rate is f_clk/tx_div; clk must be at least 3x the rate
// of the incoming link. Everything runs on the single clock clk.
// The partitioning follows the SpaceWire IP's component list; keeping FIFO
// contents across a link reset (only the credits are cleared) is this
// design's choice. A time code received before Run counts as "a character
// other than NULL" for the state machine, like an N-Char. When the link
// leaves Run in the middle of a received packet (the last N-Char stored was
// data), an EEP is written to the receive FIFO so the host sees the packet
// end in error, as EEP is defined for.
module spw_codec
  import spw_pkg::*;
#(
  parameter int unsigned CLK_KHZ    = 50000,
  parameter int unsigned FIFO_DEPTH = 128,
  parameter int unsigned MAX_CREDIT = 56
) (
  input  logic       clk,
  input  logic       rst_n,
  // link control
  input  logic       link_start,
  input  logic       link_disable,
  input  logic       autostart,
  input  logic [7:0] tx_div,
  output spw_state_e state,
  output logic       link_error,
  output logic       err_credit,
  output logic       err_par,
  output logic       err_esc,
  output logic       err_disc,
  output logic       err_empty,
  output logic       err_invalid,
  // transmit host interface
  input  logic       tx_wr,
  input  nchar_t     tx_data,
  output logic       tx_ready,
  // receive host interface
  input  logic       rx_rd,
  output nchar_t     rx_data,
  output logic       rx_valid,
  // time codes
  input  logic       tick_in,
  input  logic [7:0] time_in,
  output logic       tick_out,
  output logic [7:0] time_out,
  // link
  input  logic       din,
  input  logic       sin,
  output logic       dout,
  output logic       sout
);

  localparam int unsigned CW = $clog2(MAX_CREDIT + 1);

  logic bit_tick;
  logic enable_tx, send_null, send_fct, send_nchar, enable_rx;
  logic timer_restart, after_6u4, after_12u8;
  logic bit_valid, bit_val, got_bit;
  logic null_seen, got_null, got_fct, got_nchar, got_time;
  nchar_t rx_nchar;
  logic [7:0] rx_time;
  logic fct_sent, nchar_rd, time_sent, null_sent;
  logic tx_credit_error, rx_credit_error;
  logic [CW-1:0] tx_credit, rx_credit;
  logic fct_req;
  logic tfifo_full, tfifo_empty;
  nchar_t tfifo_dout;
  logic rfifo_full, rfifo_empty;
  logic time_pending;
  // a packet cut short by leaving Run is closed with an EEP in the receive FIFO
  logic was_run, rx_in_packet, eep_ins;
  assign eep_ins = was_run && state != ST_RUN && rx_in_packet;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      was_run      <= 1'b0;
      rx_in_packet <= 1'b0;
    end else begin
      was_run <= (state == ST_RUN);
      if (eep_ins)                            rx_in_packet <= 1'b0;
      else if (got_nchar && state == ST_RUN)  rx_in_packet <= !rx_nchar[8];
    end
  end
  logic [7:0] time_tx;

  spw_tx_clock u_txclk (.clk, .rst_n, .div(tx_div), .tick(bit_tick));

  spw_fsm u_fsm (
    .clk, .rst_n, .link_start, .link_disable, .autostart,
    .got_null, .got_fct, .got_nchar(got_nchar || got_time), .null_sent,
    .rx_err(err_disc || err_par || err_esc),
    .credit_err(err_credit), .empty_err(err_empty),
    .after_6u4, .after_12u8, .timer_restart, .state,
    .enable_tx, .send_null, .send_fct, .send_nchar, .enable_rx, .link_error
  );

  spw_timer #(.CLK_KHZ(CLK_KHZ)) u_timer (.clk, .rst_n, .restart(timer_restart), .after_6u4, .after_12u8);

  spw_fifo #(.WIDTH(9), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk, .rst_n, .wr(tx_wr), .din(tx_data), .rd(nchar_rd), .dout(tfifo_dout),
    .full(tfifo_full), .empty(tfifo_empty), .count()
  );
  assign tx_ready = !tfifo_full;

  spw_time_buf u_time (
    .clk, .rst_n, .tick_in, .time_in, .time_sent, .pending(time_pending), .time_tx,
    .got_time(got_time && state == ST_RUN), .time_rx(rx_time), .tick_out, .time_out
  );

  spw_tx #(.MAX_CREDIT(MAX_CREDIT)) u_tx (
    .clk, .rst_n, .bit_tick, .enable(enable_tx), .send_null, .send_fct, .send_nchar,
    .send_time(send_nchar), .fct_req, .fct_sent,
    .nchar_valid(!tfifo_empty && !nchar_rd), .nchar(tfifo_dout), .nchar_rd,
    .time_pending(time_pending && !time_sent), .time_code(time_tx), .time_sent,
    .got_fct(got_fct && send_fct), .credit_error(tx_credit_error), .credit(tx_credit),
    .null_sent, .invalid_err(err_invalid), .dout, .sout
  );

  spw_rx_clkrec #(.CLK_KHZ(CLK_KHZ)) u_clkrec (
    .clk, .rst_n, .enable(enable_rx), .din, .sin, .bit_valid, .bit_val, .got_bit, .disc_err(err_disc)
  );

  spw_rx u_rx (
    .clk, .rst_n, .enable(enable_rx), .bit_valid, .bit_val, .null_seen,
    .got_null, .got_fct, .got_nchar, .nchar(rx_nchar), .got_time, .time_code(rx_time),
    .err_par, .err_esc, .err_empty
  );

  spw_rx_fifo #(.WIDTH(9), .DEPTH(FIFO_DEPTH), .MAX_CREDIT(MAX_CREDIT)) u_rx_fifo (
    .clk, .rst_n, .credit_clr(!send_fct), .credit_rd(fct_sent), .credit_avail(fct_req),
    .credit_error(rx_credit_error), .credit(rx_credit),
    .wr(got_nchar && state == ST_RUN), .din(rx_nchar), .ins(eep_ins), .ins_din(NCHAR_EEP),
    .full(rfifo_full),
    .rd(rx_rd), .dout(rx_data), .empty(rfifo_empty)
  );
  assign rx_valid   = !rfifo_empty;
  assign err_credit = tx_credit_error || rx_credit_error;

endmodule
