// spw_fsm: exchange-level state machine of the SpaceWire link interface.
//
// States ErrorReset, ErrorWait, Ready, Started, Connecting and Run.
//  ErrorReset: transmitter and receiver reset; leaves after 6.4 us.
//  ErrorWait:  receiver on; after 12.8 us to Ready; a receiver error, an FCT
//              or an N-Char sends it back to ErrorReset.
//  Ready:      receiver on; to Started when the link is enabled; same errors.
//  Started:    NULLs sent; to Connecting once a NULL has been received (the
//              gotNULL condition, latched since ErrorWait) and at least one
//              NULL sent; errors or 12.8 us without a NULL go to ErrorReset.
//  Connecting: FCTs and NULLs sent; to Run on an FCT; a receiver error, an
//              N-Char or 12.8 us go to ErrorReset.
//  Run:        all characters; a receiver error, a credit error, an empty
//              packet or link_disable go to ErrorReset.
// The link is enabled when link_start is set, or autostart is set and a NULL
// has been received, and link_disable is clear. Any error that ends Run is
// reported on link_error (a one-cycle pulse).
//
// Timing: the state changes one clock after its cause; timer_restart is the
// combinational "state changes now" signal for spw_timer. The states,
// transitions and delays are SpaceWire's exchange-level protocol; the enable
// expression and the signal encoding are this design's.
module spw_fsm
  import spw_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       link_start,
  input  logic       link_disable,
  input  logic       autostart,
  input  logic       got_null,
  input  logic       got_fct,
  input  logic       got_nchar,
  input  logic       null_sent,
  input  logic       rx_err,
  input  logic       credit_err,
  input  logic       empty_err,
  input  logic       after_6u4,
  input  logic       after_12u8,
  output logic       timer_restart,
  output spw_state_e state,
  output logic       enable_tx,
  output logic       send_null,
  output logic       send_fct,
  output logic       send_nchar,
  output logic       enable_rx,
  output logic       link_error
);

  spw_state_e nstate;
  logic got_null_c;   // gotNULL condition
  logic null_sent_c;  // at least one NULL sent in Started
  logic link_enabled;

  assign link_enabled = (link_start || (autostart && (got_null_c || got_null))) && !link_disable;

  always_comb begin
    nstate = state;
    unique case (state)
      ST_ERROR_RESET: if (after_6u4) nstate = ST_ERROR_WAIT;
      ST_ERROR_WAIT:
        if (rx_err || got_fct || got_nchar) nstate = ST_ERROR_RESET;
        else if (after_12u8)                nstate = ST_READY;
      ST_READY:
        if (rx_err || got_fct || got_nchar) nstate = ST_ERROR_RESET;
        else if (link_enabled)              nstate = ST_STARTED;
      ST_STARTED:
        if (rx_err || got_fct || got_nchar || after_12u8) nstate = ST_ERROR_RESET;
        else if (got_null_c && (null_sent_c || null_sent)) nstate = ST_CONNECTING;
      ST_CONNECTING:
        if (rx_err || got_nchar || after_12u8) nstate = ST_ERROR_RESET;
        else if (got_fct)                      nstate = ST_RUN;
      ST_RUN:
        if (rx_err || credit_err || empty_err || link_disable) nstate = ST_ERROR_RESET;
      default: nstate = ST_ERROR_RESET;
    endcase
  end

  assign timer_restart = (nstate != state);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_ERROR_RESET;
      got_null_c  <= 1'b0;
      null_sent_c <= 1'b0;
      link_error  <= 1'b0;
    end else begin
      state      <= nstate;
      link_error <= (state == ST_RUN) && (rx_err || credit_err || empty_err);
      if (nstate == ST_ERROR_RESET)  got_null_c <= 1'b0;
      else if (got_null)             got_null_c <= 1'b1;
      if (nstate != ST_STARTED)      null_sent_c <= 1'b0;
      else if (null_sent)            null_sent_c <= 1'b1;
    end
  end

  assign enable_rx  = (state != ST_ERROR_RESET);
  assign enable_tx  = (state == ST_STARTED) || (state == ST_CONNECTING) || (state == ST_RUN);
  assign send_null  = enable_tx;
  assign send_fct   = (state == ST_CONNECTING) || (state == ST_RUN);
  assign send_nchar = (state == ST_RUN);

endmodule
