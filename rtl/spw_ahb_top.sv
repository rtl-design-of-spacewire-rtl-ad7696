// spw_ahb_top: SpaceWire link interface on an AMBA AHB bus.
//
// A SpaceWire link end (spw_codec) attached to an AHB slave interface with Tx
// and Rx AHB FIFOs (spw_ahb_slave), so that a processor on the AHB bus can
// start the link, send packets and time codes, and read received packets.
// The AHB slave signals are brought out as the ahbsi/ahbso records; the
// bus arbiter and address decoder are outside (ahbsi.hsel is this slave's
// select). The DS pins din/sin/dout/sout go to the LVDS line drivers and
// receivers outside the chip.
// Everything runs on clk (the AHB clock, CLK_KHZ). The link rate after reset
// is CLK_KHZ/TX_DIV (10 Mbit/s with the defaults) and can be changed through
// the control register. See spw_ahb_slave for the register map.
// The split into a SpaceWire protocol block and an AHB slave interface with
// two AHB FIFOs follows the interface description; running both on one
// clock and the default link rate are this design's choices.
module spw_ahb_top
  import ahb_pkg::*;
  import spw_pkg::*;
#(
  parameter int unsigned CLK_KHZ        = 50000,
  parameter int unsigned TX_DIV         = 5,
  parameter int unsigned FIFO_DEPTH     = 128,
  parameter int unsigned AHB_FIFO_DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ahb_slv_in_t  ahbsi,
  output ahb_slv_out_t ahbso,
  output logic         irq,
  output spw_state_e   link_state,
  input  logic         din,
  input  logic         sin,
  output logic         dout,
  output logic         sout
);

  logic       tx_wr, tx_ready, rx_rd, rx_valid;
  nchar_t     tx_data, rx_data;
  logic       link_start, link_disable, autostart;
  logic [7:0] tx_div;
  logic       tick_in, tick_out;
  logic [7:0] time_in, time_out;
  logic       link_error;
  logic       err_credit, err_par, err_esc, err_disc, err_empty, err_invalid;

  spw_ahb_slave #(.FIFO_DEPTH(AHB_FIFO_DEPTH), .TX_DIV_RST(TX_DIV)) u_ahb (
    .clk, .rst_n, .ahbsi, .ahbso, .irq,
    .tx_wr, .tx_data, .tx_ready, .rx_rd, .rx_data, .rx_valid,
    .link_start, .link_disable, .autostart, .tx_div,
    .tick_in, .time_in, .tick_out, .time_out, .state(link_state), .link_error,
    .errs({err_invalid, err_empty, err_credit, err_esc, err_par, err_disc})
  );

  spw_codec #(.CLK_KHZ(CLK_KHZ), .FIFO_DEPTH(FIFO_DEPTH)) u_codec (
    .clk, .rst_n, .link_start, .link_disable, .autostart, .tx_div,
    .state(link_state), .link_error,
    .err_credit, .err_par, .err_esc, .err_disc, .err_empty, .err_invalid,
    .tx_wr, .tx_data, .tx_ready, .rx_rd, .rx_data, .rx_valid,
    .tick_in, .time_in, .tick_out, .time_out,
    .din, .sin, .dout, .sout
  );

endmodule
