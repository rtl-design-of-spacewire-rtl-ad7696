// ahb_pkg: AMBA 2.0 AHB slave-side bus records.
//
// The two structs bundle the AHB slave inputs and outputs the way the GRLIB
// library groups them into records (ahb_slv_in / ahb_slv_out), restricted to
// the signals the SpaceWire AHB interface uses: HSEL, HWRITE, HADDR, HTRANS,
// HWDATA, HREADY, HSIZE, HBURST, HPROT in; HREADY, HRESP, HRDATA, HSPLIT out.
// HSEL is a single bit here, already decoded for this slave.
package ahb_pkg;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  localparam logic [1:0] HRESP_OKAY  = 2'b00;
  localparam logic [1:0] HRESP_ERROR = 2'b01;

  typedef struct packed {
    logic        hsel;
    logic        hwrite;
    logic [31:0] haddr;
    logic [1:0]  htrans;
    logic [31:0] hwdata;
    logic        hready;
    logic [2:0]  hsize;
    logic [2:0]  hburst;
    logic [3:0]  hprot;
  } ahb_slv_in_t;

  typedef struct packed {
    logic        hready;
    logic [1:0]  hresp;
    logic [31:0] hrdata;
    logic [15:0] hsplit;
  } ahb_slv_out_t;

endpackage
