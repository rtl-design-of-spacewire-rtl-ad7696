// spw_time_buf: time-code buffer of the SpaceWire link interface.
//
// Two one-entry holding registers. Transmit side: a tick_in pulse latches
// time_in and sets pending; the transmitter sends the code when it may and
// answers with time_sent, which clears pending. A new tick_in while a code is
// still pending replaces it. Receive side: got_time from the receiver latches
// the received code on time_out and pulses tick_out one clock later.
// Timing: pending rises one clock after tick_in. The block is only named in
// the link interface description; this structure is this design's own.
module spw_time_buf (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick_in,
  input  logic [7:0] time_in,
  input  logic       time_sent,
  output logic       pending,
  output logic [7:0] time_tx,
  input  logic       got_time,
  input  logic [7:0] time_rx,
  output logic       tick_out,
  output logic [7:0] time_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= 1'b0;
      time_tx  <= '0;
      tick_out <= 1'b0;
      time_out <= '0;
    end else begin
      if (tick_in) begin
        pending <= 1'b1;
        time_tx <= time_in;
      end else if (time_sent) begin
        pending <= 1'b0;
      end
      tick_out <= got_time;
      if (got_time) time_out <= time_rx;
    end
  end

endmodule
