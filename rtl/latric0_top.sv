// LATRIC0: single-channel timing readout for AC-LGAD strip sensors.
//
// Signal path: the front end (fe_model) turns the sensor's negative pulse
// into a digital pulse whose width is the time over threshold; pulse_mux
// selects it or an external test pulse (sel_test_pulse = 1); the
// event-driven TDC core measures TOA, CAL and TOT with one ring-oscillator
// delay line; two shift-register serializers send the results on the
// external clock, one bit per cycle:
//   dout128: {TOT raw 37b, TOA raw 37b, CAL raw 37b, header 17b}
//   dout40 : {TOT enc 12b, TOA enc 12b, CAL enc 12b, header  4b}
// Raw field = {coarse 7b, fine phases 30b}; encoded = {coarse 7b, fine 5b}.
// Both frames are loaded on the same rising clk edge (data_valid from the
// core) and sent least significant bit first, so the header comes first.
// A 40-bit frame lasts 40 cycles, a 128-bit frame 128 cycles (178 ns at
// 720 MHz).
// The blocks, the field widths and the frame sizes follow the chip
// description. Field order inside the frames is read from its block diagram;
// header patterns, bit order and frame timing are this design's own choices.
module latric0_top
  import latric0_pkg::*;
#(
  parameter real STAGE_DELAY_PS = 30.0
) (
  input  logic clk,
  input  logic rst_n,
  input  real  fe_vin,
  input  real  fe_vth,
  input  logic test_pulse,
  input  logic sel_test_pulse,
  output logic dout128,
  output logic dout40
);
  timeunit 1ps;
  timeprecision 1fs;

  logic      fe_pulse;
  logic      pulse;
  logic      data_valid;
  raw_meas_t tot_raw, toa_raw, cal_raw;
  enc_meas_t tot_enc, toa_enc, cal_enc;
  frame128_t frame128;
  frame40_t  frame40;

  fe_model u_fe (
    .vin  (fe_vin),
    .vth  (fe_vth),
    .disc (fe_pulse)
  );

  pulse_mux u_mux (
    .sel_test_pulse (sel_test_pulse),
    .fe_pulse       (fe_pulse),
    .test_pulse     (test_pulse),
    .pulse          (pulse)
  );

  tdc_core #(.STAGE_DELAY_PS(STAGE_DELAY_PS)) u_tdc (
    .clk        (clk),
    .rst_n      (rst_n),
    .pulse      (pulse),
    .ro_key     (),   // internal: no pad on the chip
    .data_valid (data_valid),
    .tot_raw    (tot_raw),
    .toa_raw    (toa_raw),
    .cal_raw    (cal_raw),
    .tot_enc    (tot_enc),
    .toa_enc    (toa_enc),
    .cal_enc    (cal_enc)
  );

  always_comb begin
    frame128 = '{tot: tot_raw, toa: toa_raw, cal: cal_raw, header: HEADER128};
    frame40  = '{tot: tot_enc, toa: toa_enc, cal: cal_enc, header: HEADER40};
  end

  shift_serializer #(.WIDTH(FRAME128_W)) u_ser128 (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (data_valid),
    .din   (frame128),
    .dout  (dout128)
  );

  shift_serializer #(.WIDTH(FRAME40_W)) u_ser40 (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (data_valid),
    .din   (frame40),
    .dout  (dout40)
  );

endmodule
