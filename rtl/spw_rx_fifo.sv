// spw_rx_fifo: SpaceWire receive FIFO with receive-side flow-control credit.
//
// The host receive buffer of the link interface. Besides storing received
// N-Chars it keeps the outstanding credit: the number of N-Chars the far end
// of the link has been allowed to send by the FCTs this end has sent. Every
// FCT sent (credit_rd) adds 8; every N-Char written takes 1. A new FCT is
// offered (credit_avail) only when the FIFO has 8 free places that are not
// yet promised and the outstanding credit stays within MAX_CREDIT (56 = 7 FCTs).
// An N-Char arriving with no outstanding credit is a credit error: it is not
// stored, and credit_error pulses for one cycle.
// ins/ins_din write one entry without using credit (when not full, and
// taking precedence over wr): the link interface uses it to close a packet
// cut short by a link error with an EEP.
//
// Interface: wr/din from the receiver, rd/dout/empty to the host
// (first-word fall-through), credit_clr clears the credit while the link is
// reset. Timing: credit_avail and credit follow a write or an FCT by one clock.
// The credit rule and the MAX_CREDIT of 7*8 follow the link interface's
// receive FIFO; the sizes are parameters.
module spw_rx_fifo #(
  parameter int unsigned WIDTH      = 9,
  parameter int unsigned DEPTH      = 128,
  parameter int unsigned MAX_CREDIT = 56,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned CW = $clog2(MAX_CREDIT + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             credit_clr,
  input  logic             credit_rd,
  output logic             credit_avail,
  output logic             credit_error,
  output logic [CW-1:0]    credit,
  input  logic             wr,
  input  logic [WIDTH-1:0] din,
  input  logic             ins,
  input  logic [WIDTH-1:0] ins_din,
  output logic             full,
  input  logic             rd,
  output logic [WIDTH-1:0] dout,
  output logic             empty
);

  logic [AW:0] count;
  logic        accept;

  assign accept = wr && !ins && (credit != '0) && !full;

  spw_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .wr(accept || (ins && !full)), .din(ins ? ins_din : din),
    .rd, .dout, .full, .empty, .count
  );

  // free places not yet promised to the far end
  logic [AW+1:0] unpromised;
  assign unpromised = (AW+2)'(DEPTH) - (AW+2)'(count) - (AW+2)'(credit);

  assign credit_avail = !credit_clr && (unpromised >= (AW+2)'(8)) &&
                        ((CW+1)'(credit) + (CW+1)'(8) <= (CW+1)'(MAX_CREDIT));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credit       <= '0;
      credit_error <= 1'b0;
    end else if (credit_clr) begin
      credit       <= '0;
      credit_error <= 1'b0;
    end else begin
      credit_error <= wr && (credit == '0);
      credit <= credit + (credit_rd && credit_avail ? CW'(8) : CW'(0)) - (accept ? CW'(1) : CW'(0));
    end
  end

endmodule
