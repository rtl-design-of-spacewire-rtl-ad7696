// spw_tx: SpaceWire transmitter.
//
// Builds the characters of the link and sends them Data-Strobe encoded, one
// bit per bit_tick. A character is sent as its parity bit, its data-control
// flag and then its payload, least significant bit first: data characters
// carry 8 bits (10 bits in all), control characters 2 bits (4 in all). The
// parity bit makes the previous character's payload, the parity bit itself
// and the current flag hold an odd number of ones. NULL is ESC then FCT; a
// time code is ESC then a data character holding the 8-bit time value.
// DS encoding: D carries the bit; S toggles whenever D does not, so D xor S
// toggles every bit.
//
// At each character boundary the next character is chosen, highest first:
// the second half of a NULL or time code, a time code (send_time), an FCT
// (send_fct and fct_req), an N-Char (send_nchar, data in the host FIFO and
// transmit credit left), otherwise a NULL. The transmit credit counts the
// N-Chars the far end has room for: +8 for each FCT received (got_fct), -1
// per N-Char sent; an FCT that would take it past MAX_CREDIT raises
// credit_error. When enable falls the transmitter stops, clears S and then,
// one clock later, D, so both never change together; credit and character
// state are cleared.
// A host character with the control flag set and bits 7:1 not zero is
// invalid: it is taken from the FIFO without being sent, invalid_err pulses
// and N-Char transmission stays halted (NULLs, FCTs and time codes go on)
// until enable falls, i.e. until the link is reset.
//
// Pulses fct_sent, nchar_rd, time_sent and null_sent mark the tick a
// character starts. The character formats, parity rule, DS code, credit of 8
// per FCT, the S-then-D stop and the invalid-character rule are SpaceWire's; the priority order and the
// time-code format are this design's choices.
module spw_tx
  import spw_pkg::*;
#(
  parameter int unsigned MAX_CREDIT = 56,
  localparam int unsigned CW = $clog2(MAX_CREDIT + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bit_tick,
  // from the exchange-level state machine
  input  logic          enable,
  input  logic          send_null,
  input  logic          send_fct,
  input  logic          send_nchar,
  input  logic          send_time,
  // FCT requests from the receive buffer
  input  logic          fct_req,
  output logic          fct_sent,
  // N-Chars from the transmit FIFO
  input  logic          nchar_valid,
  input  nchar_t        nchar,
  output logic          nchar_rd,
  // time codes
  input  logic          time_pending,
  input  logic [7:0]    time_code,
  output logic          time_sent,
  // credit
  input  logic          got_fct,
  output logic          credit_error,
  output logic [CW-1:0] credit,
  output logic          null_sent,
  output logic          invalid_err,
  // link
  output logic          dout,
  output logic          sout
);

  typedef enum logic [1:0] {SECOND_NONE, SECOND_FCT, SECOND_TIME} second_e;

  logic [9:0] sh;
  logic [3:0] nleft;
  logic       par_acc;     // xor of the previous character's payload
  second_e    second;

  // next character at a boundary
  logic [9:0] nbits;
  logic [3:0] nlen;
  logic       npar;
  second_e    nsecond;
  logic       pick_fct, pick_nchar, pick_time, pick_null;
  logic       halted;      // an invalid character was given: no more N-Chars
  wire        nchar_bad = nchar[8] && (nchar[7:1] != '0);
  wire        drop      = enable && send_nchar && nchar_valid && nchar_bad && !halted;

  function automatic logic [9:0] ctrl_bits(logic p, logic [1:0] cc);
    return {6'b0, cc[1], cc[0], 1'b1, p};
  endfunction
  function automatic logic [9:0] data_bits(logic p, logic [7:0] d);
    return {d, 1'b0, p};
  endfunction

  always_comb begin
    pick_fct = 1'b0; pick_nchar = 1'b0; pick_time = 1'b0; pick_null = 1'b0;
    nsecond  = SECOND_NONE;
    nbits    = '0; nlen = 4'd4; npar = 1'b0;
    if (second == SECOND_FCT) begin
      nbits = ctrl_bits(~(1'b1 ^ par_acc), CC_FCT);
      npar  = 1'b0;
    end else if (second == SECOND_TIME) begin
      nbits = data_bits(~(1'b0 ^ par_acc), time_code);
      nlen  = 4'd10;
      npar  = ^time_code;
    end else if (send_time && time_pending) begin
      pick_time = 1'b1;
      nbits   = ctrl_bits(~(1'b1 ^ par_acc), CC_ESC);
      npar    = 1'b0;
      nsecond = SECOND_TIME;
    end else if (send_fct && fct_req) begin
      pick_fct = 1'b1;
      nbits = ctrl_bits(~(1'b1 ^ par_acc), CC_FCT);
      npar  = 1'b0;
    end else if (send_nchar && nchar_valid && !nchar_bad && !halted && credit != '0) begin
      pick_nchar = 1'b1;
      if (nchar[8]) begin
        nbits = ctrl_bits(~(1'b1 ^ par_acc), nchar[0] ? CC_EEP : CC_EOP);
        npar  = 1'b1;
      end else begin
        nbits = data_bits(~(1'b0 ^ par_acc), nchar[7:0]);
        nlen  = 4'd10;
        npar  = ^nchar[7:0];
      end
    end else begin
      pick_null = send_null;
      nbits   = ctrl_bits(~(1'b1 ^ par_acc), CC_ESC);
      npar    = 1'b0;
      nsecond = SECOND_FCT;
    end
  end

  wire boundary = enable && bit_tick && (nleft == '0) && (send_null || second != SECOND_NONE);
  wire cur_bit  = (nleft == '0) ? nbits[0] : sh[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; nleft <= '0; par_acc <= 1'b0; second <= SECOND_NONE;
      dout <= 1'b0; sout <= 1'b0;
      fct_sent <= 1'b0; nchar_rd <= 1'b0; time_sent <= 1'b0; null_sent <= 1'b0;
      halted <= 1'b0; invalid_err <= 1'b0;
    end else begin
      fct_sent <= 1'b0; nchar_rd <= 1'b0; time_sent <= 1'b0; null_sent <= 1'b0;
      invalid_err <= drop;
      if (drop)    halted <= 1'b1;
      if (!enable) halted <= 1'b0;
      if (!enable) begin
        // controlled stop: strobe first, then data
        sh <= '0; nleft <= '0; par_acc <= 1'b0; second <= SECOND_NONE;
        if (sout) sout <= 1'b0;
        else      dout <= 1'b0;
      end else if (bit_tick && (nleft != '0 || boundary)) begin
        dout <= cur_bit;
        sout <= cur_bit ^ ~(dout ^ sout);
        if (nleft == '0) begin
          sh        <= nbits >> 1;
          nleft     <= nlen - 4'd1;
          par_acc   <= npar;
          second    <= nsecond;
          fct_sent  <= pick_fct;
          nchar_rd  <= pick_nchar;
          time_sent <= pick_time;
          null_sent <= pick_null;
        end else begin
          sh    <= sh >> 1;
          nleft <= nleft - 4'd1;
        end
      end
      if (drop) nchar_rd <= 1'b1;  // the invalid character leaves the FIFO unsent
    end
  end

  // transmit credit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credit       <= '0;
      credit_error <= 1'b0;
    end else if (!enable) begin
      credit       <= '0;
      credit_error <= 1'b0;
    end else begin
      logic [CW:0] up;
      up = (CW+1)'(credit) + (got_fct ? (CW+1)'(8) : '0);
      credit_error <= got_fct && (up > (CW+1)'(MAX_CREDIT));
      if (up > (CW+1)'(MAX_CREDIT)) up = (CW+1)'(credit);
      credit <= CW'(up) - ((boundary && pick_nchar) ? CW'(1) : CW'(0));
    end
  end

`ifndef SYNTHESIS
  a_credit_max: assert property (@(posedge clk) disable iff (!rst_n) credit <= CW'(MAX_CREDIT));
`endif

endmodule
