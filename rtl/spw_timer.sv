// spw_timer: state timer of the SpaceWire exchange-level state machine.
//
// Measures the time since the state machine entered its current state and
// raises after_6u4 once 6.4 us and after_12u8 once 12.8 us have passed. A
// restart pulse (given on every state change) clears it. Both flags stay set
// until the next restart. The two delays are the SpaceWire nominal values;
// counting system-clock cycles (T_NS * CLK_KHZ / 10^6, rounded up) is this
// design's implementation.
module spw_timer #(
  parameter int unsigned CLK_KHZ = 50000,
  parameter int unsigned T1_NS   = 6400,
  parameter int unsigned T2_NS   = 12800,
  localparam int unsigned C1 = spw_pkg::ns_to_cycles(T1_NS, CLK_KHZ),
  localparam int unsigned C2 = spw_pkg::ns_to_cycles(T2_NS, CLK_KHZ),
  localparam int unsigned W  = $clog2(C2 + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic restart,
  output logic after_6u4,
  output logic after_12u8
);

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  cnt <= '0;
    else if (restart)            cnt <= '0;
    else if (cnt != W'(C2))      cnt <= cnt + 1'b1;
  end

  assign after_6u4  = (cnt >= W'(C1));
  assign after_12u8 = (cnt == W'(C2));

endmodule
