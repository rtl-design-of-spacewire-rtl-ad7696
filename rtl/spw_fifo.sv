// spw_fifo: synchronous first-in first-out buffer.
//
// Used as the transmit FIFO of the SpaceWire link interface and as the Tx and
// Rx AHB FIFOs of the AHB slave interface. The storage is a DEPTH x WIDTH
// array addressed by read and write pointers that carry one extra wrap bit,
// so full and empty are told apart without a separate counter.
//
// Interface: wr pushes din unless full; rd pops unless empty. dout always
// shows the oldest entry (first-word fall-through), so a reader samples dout
// in the cycle it raises rd. A push and a pop may happen in the same cycle.
// Timing: a pushed word is visible on dout one clock after the push.
// The depth of 128 entries of 9 bits is the receive FIFO size given for the
// link interface; using it for every FIFO is this design's choice.
module spw_fifo #(
  parameter int unsigned WIDTH = 9,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr,
  input  logic [WIDTH-1:0] din,
  input  logic             rd,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, rptr;

  wire do_wr = wr && !full;
  wire do_rd = rd && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= (wptr[AW-1:0] == AW'(DEPTH-1)) ? {~wptr[AW], {AW{1'b0}}} : wptr + 1'b1;
      if (do_rd) rptr <= (rptr[AW-1:0] == AW'(DEPTH-1)) ? {~rptr[AW], {AW{1'b0}}} : rptr + 1'b1;
    end
  end

  assign dout  = mem[rptr[AW-1:0]];
  assign empty = (wptr == rptr);
  assign full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  always_comb begin
    if (wptr[AW] == rptr[AW]) count = (AW+1)'(wptr[AW-1:0]) - (AW+1)'(rptr[AW-1:0]);
    else                      count = (AW+1)'(DEPTH) + (AW+1)'(wptr[AW-1:0]) - (AW+1)'(rptr[AW-1:0]);
  end

`ifndef SYNTHESIS
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
`endif

endmodule
