// spw_tx_clock: transmit bit-rate generator of the SpaceWire link interface.
//
// Derives the transmit bit rate from the system clock: a down-counter reloads
// with div-1 and emits a one-cycle tick every div cycles. The transmitter
// shifts out one bit per tick, so the link rate is f_clk/div (50 MHz / 5 =
// 10 Mbit/s by default). div is a run-time input so the host can change the
// rate; values below 2 are treated as 2. Taking the rate from the system
// clock follows the link interface description; the divider and its tick
// output (a clock enable rather than a clock) are this design's choice.
module spw_tx_clock #(
  parameter int unsigned DIV_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] div,
  output logic             tick
);

  logic [DIV_W-1:0] cnt;
  logic [DIV_W-1:0] div_eff;

  assign div_eff = (div < DIV_W'(2)) ? DIV_W'(2) : div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == '0) begin
      cnt  <= div_eff - 1'b1;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt - 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
