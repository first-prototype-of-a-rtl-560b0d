// LATRIC0 TDC core: timing controller, event-driven ring oscillator with
// quantization logic (S2D phases, coarse counter, three latch groups) and
// encoder, wired as in the chip's block diagram.
//
// A hit on `pulse` starts the ring at its leading edge. Three times are
// measured from that instant with one shared delay line:
//   TOA - to the next rising edge of clk (R1),
//   CAL - to the rising edge after that (R2 = R1 + one clk period),
//   TOT - to the trailing edge of the pulse.
// Each raw result is {7-bit coarse count of ring periods, 30 fine phases};
// in cell delays the time is coarse*30 + fine. CAL - TOA equals the clk
// period in cell delays and gives the LSB calibration. When all three are
// captured the ring stops and data_valid is high for one rising clk edge,
// during which the raw and encoded results are stable.
// Latency: data_valid comes on the first falling clk edge after both R2 and
// the trailing edge, i.e. 1.5 to 2.5 clk periods after the hit for pulses
// shorter than R2. Dead time: until the falling clk edge after data_valid.
module tdc_core
  import latric0_pkg::*;
#(
  parameter real STAGE_DELAY_PS = 30.0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      pulse,
  output logic      ro_key,
  output logic      data_valid,
  output raw_meas_t tot_raw,
  output raw_meas_t toa_raw,
  output raw_meas_t cal_raw,
  output enc_meas_t tot_enc,
  output enc_meas_t toa_enc,
  output enc_meas_t cal_enc
);
  timeunit 1ps;
  timeprecision 1fs;

  logic                clk_latch1;
  logic                clk_latch2;
  logic                tot_latch;
  logic [N_PHASES-1:0] phase;
  logic [COARSE_W-1:0] coarse;

  timing_controller u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .pulse      (pulse),
    .ro_key     (ro_key),
    .clk_ref    (),        // observed only in the controller's tests
    .clk_latch1 (clk_latch1),
    .clk_latch2 (clk_latch2),
    .tot_latch  (tot_latch),
    .data_valid (data_valid)
  );

  ro_delay_line #(.STAGE_DELAY_PS(STAGE_DELAY_PS)) u_ro (
    .ro_key (ro_key),
    .phase  (phase)
  );

  coarse_counter u_coarse (
    .rst_n     (rst_n),
    .ro_key    (ro_key),
    .ro_period (phase[N_PHASES-1]),
    .count     (coarse)
  );

  latch_groups u_latch (
    .clk_latch1 (clk_latch1),
    .clk_latch2 (clk_latch2),
    .tot_latch  (tot_latch),
    .phase      (phase),
    .coarse     (coarse),
    .group1     (cal_raw),
    .group2     (toa_raw),
    .group3     (tot_raw)
  );

  tdc_encoder u_enc (
    .tot_raw (tot_raw),
    .toa_raw (toa_raw),
    .cal_raw (cal_raw),
    .tot_enc (tot_enc),
    .toa_enc (toa_enc),
    .cal_enc (cal_enc)
  );

endmodule
