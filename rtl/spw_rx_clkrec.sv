// spw_rx_clkrec: receive clock recovery and disconnect detection.
//
// With Data-Strobe encoding exactly one of D and S changes per bit, so D xor S
// toggles once per bit and is the recovered bit clock. This block samples D
// and S with the system clock through two-flop synchronisers and emits
// bit_valid for one cycle whenever the synchronised D xor S changes, with the
// bit value (the new D) on bit_val. It also raises got_bit at the first D or S
// transition after being enabled and, from then on, disc_err once no
// transition has been seen for the disconnect time (850 ns nominal).
//
// Timing: bit_valid comes 3 clocks after the D/S edge. The system clock must
// be at least 3x the bit rate. While enable is low all state is cleared.
// D xor S recovery and the 850 ns disconnect time are SpaceWire's; doing the
// recovery by oversampling in the system clock domain is this design's choice.
module spw_rx_clkrec #(
  parameter int unsigned CLK_KHZ = 50000,
  parameter int unsigned DISC_NS = 850,
  localparam int unsigned DC = spw_pkg::ns_to_cycles(DISC_NS, CLK_KHZ),
  localparam int unsigned W  = $clog2(DC + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic din,
  input  logic sin,
  output logic bit_valid,
  output logic bit_val,
  output logic got_bit,
  output logic disc_err
);

  logic [1:0] d_sync, s_sync;
  logic       d_q, s_q;
  logic [W-1:0] idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_sync <= '0;
      s_sync <= '0;
      d_q    <= 1'b0;
      s_q    <= 1'b0;
    end else begin
      d_sync <= {d_sync[0], din};
      s_sync <= {s_sync[0], sin};
      d_q    <= d_sync[1];
      s_q    <= s_sync[1];
    end
  end

  logic edge_seen;
  assign edge_seen = (d_q ^ s_q) != (d_sync[1] ^ s_sync[1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_valid <= 1'b0;
      bit_val   <= 1'b0;
      got_bit   <= 1'b0;
      disc_err  <= 1'b0;
      idle      <= '0;
    end else if (!enable) begin
      bit_valid <= 1'b0;
      got_bit   <= 1'b0;
      disc_err  <= 1'b0;
      idle      <= '0;
    end else begin
      bit_valid <= edge_seen;
      if (edge_seen) bit_val <= d_sync[1];
      if (edge_seen) begin
        got_bit <= 1'b1;
        idle    <= '0;
      end else if (got_bit && idle != W'(DC)) begin
        idle <= idle + 1'b1;
      end
      disc_err <= got_bit && !edge_seen && (idle == W'(DC - 1) || idle == W'(DC));
    end
  end

endmodule
