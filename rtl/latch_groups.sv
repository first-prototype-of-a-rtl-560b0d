// The three latch groups of the LATRIC0 quantization logic. Each group holds
// the 30 fine phases of the ring and the 7-bit coarse count.
//   group1: sampled on clk_latch1 - TOA at R1, then overwritten by CAL at R2
//   group2: copies group1 on clk_latch2 - at F1 this saves the TOA value
//   group3: sampled on tot_latch at the trailing edge of the pulse (TOT)
// After a measurement, group3 = TOT, group2 = TOA, group1 = CAL, and they
// hold until the next event. The chip uses gated set-reset latches strobed by
// short pulses; here each group is a register sampled on the rising edge of
// its strobe, which is what a short strobe achieves. The group roles and the
// two-stage TOA/CAL arrangement follow the chip description. Groups are not
// reset: every group is written during a measurement before it is read.
module latch_groups
  import latric0_pkg::*;
(
  input  logic                clk_latch1,
  input  logic                clk_latch2,
  input  logic                tot_latch,
  input  logic [N_PHASES-1:0] phase,
  input  logic [COARSE_W-1:0] coarse,
  output raw_meas_t           group1,   // CAL after a measurement
  output raw_meas_t           group2,   // TOA after a measurement
  output raw_meas_t           group3    // TOT after a measurement
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk_latch1) group1 <= '{coarse: coarse, fine: phase};
  always_ff @(posedge clk_latch2) group2 <= group1;
  always_ff @(posedge tot_latch)  group3 <= '{coarse: coarse, fine: phase};

endmodule
