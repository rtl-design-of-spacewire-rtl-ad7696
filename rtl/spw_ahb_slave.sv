// spw_ahb_slave: AMBA AHB slave interface for the SpaceWire link interface.
//
// Lets an AHB master (the processor) send and receive SpaceWire N-Chars. It
// holds a Tx AHB FIFO, filled by AHB writes and emptied into the link
// interface's transmit host interface, and an Rx AHB FIFO, filled from the
// link interface's receive host interface and emptied by AHB reads.
// A three-state machine follows the AHB transfers: Idle; an address phase
// with HSEL=1, HREADY=1 and HTRANS NONSEQ or SEQ moves it to Write (HWRITE=1)
// or Read (HWRITE=0), where the data phase is served; with no new transfer it
// returns to Idle. Every transfer completes with zero wait states and OKAY.
//
// Register map (offset within the slave's address window):
//  0x00-0x3C data  write: bits 8:0 = N-Char pushed to the Tx AHB FIFO
//                        (bit 8 set: EOP if bit 0 = 0, EEP if 1); dropped
//                        and overflow set when the FIFO is full.
//                  read:  bit 31 = valid, bits 8:0 = N-Char popped from the
//                        Rx AHB FIFO; 0 when it is empty.
//  0x40 status     read: 2:0 link state, 3 Tx AHB FIFO full, 4 Rx AHB FIFO
//                        empty, 5 overflow, 6 link error, 7 time code
//                        received, 15:8 last time code received, 20:16
//                        receiver errors seen {empty packet, credit,
//                        escape, parity, disconnect}, also during start-up,
//                        21 invalid host character (transmission halted).
//                  write: clears bits 5, 6, 7 and 21:16.
//  0x44 control    r/w:  0 link start, 1 autostart, 2 link disable,
//                        15:8 transmit clock divider (reset TX_DIV_RST).
//  0x48 time       write: bits 7:0 sent as a time code.
// irq is high while the Rx AHB FIFO holds data or a link error is flagged.
// The Idle/Read/Write machine and its conditions and the two AHB FIFOs follow
// the interface description; the register map, the FIFO depth, the overflow
// handling and the zero-wait-state timing are this design's choices.
module spw_ahb_slave
  import ahb_pkg::*;
  import spw_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned TX_DIV_RST = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ahb_slv_in_t  ahbsi,
  output ahb_slv_out_t ahbso,
  output logic         irq,
  // link interface side
  output logic         tx_wr,
  output nchar_t       tx_data,
  input  logic         tx_ready,
  output logic         rx_rd,
  input  nchar_t       rx_data,
  input  logic         rx_valid,
  output logic         link_start,
  output logic         link_disable,
  output logic         autostart,
  output logic [7:0]   tx_div,
  output logic         tick_in,
  output logic [7:0]   time_in,
  input  logic         tick_out,
  input  logic [7:0]   time_out,
  input  spw_state_e   state,
  input  logic         link_error,
  input  logic [5:0]   errs
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} ahb_state_e;

  ahb_state_e st;
  logic [5:0] addr_q;
  logic       overflow, lerr, time_rcv;
  logic [5:0] err_q;
  logic [7:0] last_time;
  logic [15:0] ctrl;

  // Tx AHB FIFO
  logic   txa_wr, txa_full, txa_empty;
  nchar_t txa_dout;
  // Rx AHB FIFO
  logic   rxa_rd, rxa_full, rxa_empty;
  nchar_t rxa_dout;

  wire addr_valid = ahbsi.hsel && ahbsi.hready && ahbsi.htrans[1];
  wire is_data    = (addr_q[5:4] == 2'b00);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      addr_q <= '0;
    end else if (addr_valid) begin
      st     <= ahbsi.hwrite ? S_WRITE : S_READ;
      addr_q <= ahbsi.haddr[7:2];
    end else if (ahbsi.hready) begin
      st     <= S_IDLE;
    end
  end

  // data phase
  assign txa_wr = (st == S_WRITE) && is_data;
  assign rxa_rd = (st == S_READ) && is_data;

  spw_fifo #(.WIDTH(9), .DEPTH(FIFO_DEPTH)) u_txa (
    .clk, .rst_n, .wr(txa_wr), .din(ahbsi.hwdata[8:0]), .rd(tx_wr), .dout(txa_dout),
    .full(txa_full), .empty(txa_empty), .count()
  );

  spw_fifo #(.WIDTH(9), .DEPTH(FIFO_DEPTH)) u_rxa (
    .clk, .rst_n, .wr(rx_rd), .din(rx_data), .rd(rxa_rd), .dout(rxa_dout),
    .full(rxa_full), .empty(rxa_empty), .count()
  );

  // FIFO to link interface transfers
  assign tx_wr   = !txa_empty && tx_ready;
  assign tx_data = txa_dout;
  assign rx_rd   = rx_valid && !rxa_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      overflow  <= 1'b0;
      err_q     <= '0;
      lerr      <= 1'b0;
      time_rcv  <= 1'b0;
      last_time <= '0;
      ctrl      <= {8'(TX_DIV_RST), 8'h00};
      tick_in   <= 1'b0;
      time_in   <= '0;
    end else begin
      tick_in <= 1'b0;
      if (st == S_WRITE) begin
        unique case (addr_q)
          6'h10: begin overflow <= 1'b0; lerr <= 1'b0; time_rcv <= 1'b0; err_q <= '0; end
          6'h11: ctrl <= ahbsi.hwdata[15:0];
          6'h12: begin tick_in <= 1'b1; time_in <= ahbsi.hwdata[7:0]; end
          default: if (is_data && txa_full) overflow <= 1'b1;
        endcase
      end
      if (link_error) lerr <= 1'b1;
      if (!(st == S_WRITE && addr_q == 6'h10)) err_q <= err_q | errs;
      if (tick_out) begin
        time_rcv  <= 1'b1;
        last_time <= time_out;
      end
    end
  end

  assign link_start   = ctrl[0];
  assign autostart    = ctrl[1];
  assign link_disable = ctrl[2];
  assign tx_div       = ctrl[15:8];

  always_comb begin
    ahbso.hready = 1'b1;
    ahbso.hresp  = HRESP_OKAY;
    ahbso.hsplit = '0;
    ahbso.hrdata = '0;
    if (st == S_READ) begin
      if (is_data)               ahbso.hrdata = rxa_empty ? 32'h0 : {1'b1, 22'b0, rxa_dout};
      else if (addr_q == 6'h10)  ahbso.hrdata = {10'b0, err_q, last_time, time_rcv, lerr, overflow,
                                                 rxa_empty, txa_full, state};
      else if (addr_q == 6'h11)  ahbso.hrdata = {16'b0, ctrl};
    end
  end

  assign irq = !rxa_empty || lerr;

`ifndef SYNTHESIS
  // AHB rule: no transfer may start while a slave stretches the data phase;
  // this slave never stretches, so HREADYOUT stays high.
  a_no_wait: assert property (@(posedge clk) disable iff (!rst_n) ahbso.hready);
  a_tx_ready: assert property (@(posedge clk) disable iff (!rst_n) tx_wr |-> tx_ready);
`endif

endmodule
