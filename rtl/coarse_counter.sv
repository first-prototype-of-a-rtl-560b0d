// Coarse counter of the LATRIC0 TDC: counts complete ring-oscillator periods
// since RO_key rose. It is clocked by the last fine phase (phase[29] of the
// ring), which rises once per period at the instant the fine value wraps
// from 29 to 0, and it is held at zero while RO_key is low, so it starts and
// clears together with the ring. Width 7 bits as in the chip; it wraps after
// 128 periods (about 115 ns at 30 ps per cell).
// The chip description gives the width and the start/clear behaviour; the
// choice of the clocking phase and the extra clear by the global reset are
// this design's.
// Two asynchronous clears (RO_key low, rst_n low); a synthesis flow that
// supports only one asynchronous load per flip-flop needs them merged.
module coarse_counter
  import latric0_pkg::*;
(
  input  logic                rst_n,      // global asynchronous reset
  input  logic                ro_key,     // counter runs while high
  input  logic                ro_period,  // rises once per RO period
  output logic [COARSE_W-1:0] count
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge ro_period or negedge ro_key or negedge rst_n) begin
    if (!rst_n)       count <= '0;
    else if (!ro_key) count <= '0;
    else              count <= count + 1'b1;
  end

endmodule
