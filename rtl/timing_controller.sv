// Event-driven timing controller of the LATRIC0 TDC core.
//
// Idle, it keeps the ring oscillator stopped (ro_key = 0) and the gated
// reference clock clk_ref static high. The leading edge of `pulse` sets
// ro_key asynchronously, which starts the ring and the coarse counter at the
// exact arrival time, and opens the gate: clk_ref = clk OR NOT ro_key.
// From then on, in terms of clk_ref edges after the arrival:
//   F0 (first falling edge)  -> clk_latch2 rises (moves group1 to group2; the
//                               content is discarded later)
//   R1 (first rising edge)   -> clk_latch1 rises: TOA captured in group1
//   F1                       -> clk_latch2 rises: TOA moved to group2
//   R2                       -> clk_latch1 rises: CAL captured in group1
//   trailing edge of pulse   -> tot_latch rises: TOT captured in group3
// Since R2 comes exactly one clock period after R1, CAL - TOA is one clock
// period expressed in delay-cell units, which calibrates the LSB.
// When R2 has passed and the trailing edge has been seen, `stop` is set on
// the next falling clk edge. It clears ro_key (ring stops and resets,
// coarse counter clears, clk_ref returns high) and, for exactly one rising
// clk edge, flags that the latched results are complete (data_valid).
// rst_n clears all of this state as well; the chip description does not
// mention a reset. A pulse whose leading edge falls while a measurement is running or while
// `stop` is high is ignored.
//
// The edge sequence F0/R1/F1/R2, the gating and the stop condition follow the
// chip description. The latch signals here are levels whose rising edge is
// the sampling instant (the chip uses short pulses), the exact stop instant
// and the data_valid flag are this design's own choices.
//
// Circuit notes: ro_key is a flip-flop clocked by the input pulse, and the
// edge counters are clocked by the gated clock; these asynchronous clock
// domains are the point of an event-driven TDC. The latch strobes are
// gated clocks whose enables change only while the gating clock phase holds
// the strobe low, so they are free of glitches.
// Each edge counter has two asynchronous clears (ro_key low, rst_n low) so
// that it is held at zero whenever the ring is stopped; a synthesis flow that
// supports only one asynchronous load per flip-flop needs them merged into
// one clear net.
module timing_controller (
  input  logic clk,        // external reference clock
  input  logic rst_n,      // asynchronous reset, active low
  input  logic pulse,      // digital hit pulse (from the input mux)
  output logic ro_key,     // ring oscillator enable
  output logic clk_ref,    // event-gated clock, static high when idle
  output logic clk_latch1, // strobe of latch group1 (TOA at R1, CAL at R2)
  output logic clk_latch2, // strobe of latch group2 (copy of group1 at F0, F1)
  output logic tot_latch,  // strobe of latch group3 (TOT at trailing edge)
  output logic data_valid  // results complete, one rising clk edge long
);
  timeunit 1ps;
  timeprecision 1fs;

  logic       stop;
  logic       key_clr;
  logic [1:0] n_fall;      // clk_ref falling edges since start, saturating
  logic [1:0] n_rise;      // clk_ref rising edges since start, saturating
  logic       tot_done;

  // RO_key: set by the leading edge of the pulse, cleared by stop or reset.
  always_comb key_clr = stop | ~rst_n;

  always_ff @(posedge pulse or posedge key_clr) begin
    if (key_clr) ro_key <= 1'b0;
    else         ro_key <= 1'b1;
  end

  // Event-gated clock: follows clk while ro_key is high, else held high.
  always_comb clk_ref = clk | ~ro_key;

  always_ff @(negedge clk_ref or negedge ro_key or negedge rst_n) begin
    if (!rst_n)              n_fall <= 2'd0;
    else if (!ro_key)        n_fall <= 2'd0;
    else if (n_fall != 2'd3) n_fall <= n_fall + 2'd1;
  end

  always_ff @(posedge clk_ref or negedge ro_key or negedge rst_n) begin
    if (!rst_n)              n_rise <= 2'd0;
    else if (!ro_key)        n_rise <= 2'd0;
    else if (n_rise != 2'd3) n_rise <= n_rise + 2'd1;
  end

  // Trailing edge of the pulse that started the measurement.
  always_ff @(negedge pulse or negedge ro_key or negedge rst_n) begin
    if (!rst_n)       tot_done <= 1'b0;
    else if (!ro_key) tot_done <= 1'b0;
    else              tot_done <= 1'b1;
  end

  // Strobes. clk_latch1 is open for the clock-high phases after F0 and F1
  // (rising edges R1, R2); clk_latch2 for the clock-low phases before R1 and
  // R2 (rising edges F0, F1).
  always_comb clk_latch1 = clk_ref & ro_key & ((n_fall == 2'd1) | (n_fall == 2'd2));
  always_comb clk_latch2 = ~clk_ref & (n_rise < 2'd2);
  always_comb tot_latch  = ro_key & tot_done;

  // Stop once CAL (R2) and TOT are both captured.
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) stop <= 1'b0;
    else        stop <= ro_key & tot_done & (n_rise >= 2'd2);
  end

  always_comb data_valid = stop;

endmodule
