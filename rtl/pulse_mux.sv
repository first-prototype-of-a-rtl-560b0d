// Input selector of the TDC core. In FE mode (sel_test_pulse = 0) the
// discriminator output of the on-chip front end is timed; in test-pulse mode
// (sel_test_pulse = 1) an external digital test pulse is timed instead, which
// is how TOA and TOT transfer curves are scanned without the analog chain.
// The selection itself follows the chip's block diagram; the name and
// polarity of the select signal are this design's choice. Purely
// combinational, no clock.
module pulse_mux (
  input  logic sel_test_pulse,  // 1: test pulse, 0: front end
  input  logic fe_pulse,
  input  logic test_pulse,
  output logic pulse
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb pulse = sel_test_pulse ? test_pulse : fe_pulse;

endmodule
