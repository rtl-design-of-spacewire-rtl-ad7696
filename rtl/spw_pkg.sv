// spw_pkg: types and constants shared by the SpaceWire link interface.
//
// Holds the exchange-level state encoding, the 2-bit control codes in the
// order they are sent on the wire, and the 9-bit host-side N-Char format
// (bit 8 = control flag; with the flag set, bit 0 selects EOP (0) or EEP (1)).
// The control codes follow the SpaceWire character definitions: after the
// parity bit and the control flag, FCT sends 0,0, EOP 0,1, EEP 1,0 and ESC 1,1.
// The state names follow the SpaceWire exchange-level state diagram; the
// host N-Char encoding is this design's own choice.
package spw_pkg;

  typedef enum logic [2:0] {
    ST_ERROR_RESET = 3'd0,
    ST_ERROR_WAIT  = 3'd1,
    ST_READY       = 3'd2,
    ST_STARTED     = 3'd3,
    ST_CONNECTING  = 3'd4,
    ST_RUN         = 3'd5
  } spw_state_e;

  // Control code bits as sent: index 0 is sent first.
  localparam logic [1:0] CC_FCT = 2'b00;  // sent 0,0
  localparam logic [1:0] CC_EOP = 2'b10;  // sent 0,1
  localparam logic [1:0] CC_EEP = 2'b01;  // sent 1,0
  localparam logic [1:0] CC_ESC = 2'b11;  // sent 1,1

  // Host-side N-Char: {control flag, data}
  typedef logic [8:0] nchar_t;

  localparam nchar_t NCHAR_EOP = 9'h100;
  localparam nchar_t NCHAR_EEP = 9'h101;

  // Number of system-clock cycles for a time in ns at a clock in kHz, rounded up.
  function automatic int unsigned ns_to_cycles(int unsigned ns, int unsigned clk_khz);
    longint unsigned p;
    p = longint'(ns) * longint'(clk_khz);
    return int'((p + 64'd999_999) / 64'd1_000_000);
  endfunction

endpackage
