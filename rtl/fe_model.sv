// Behavioural model of the LATRIC0 analog front end (transimpedance amplifier
// plus discriminator). It is not synthesizable logic: the real block is an
// analog circuit. It turns a negative analog pulse at `vin` into a positive
// digital pulse at `disc` that is high while the amplified signal is above
// the discriminator threshold `vth`, so the width of `disc` is the
// time-over-threshold that the TDC measures.
//
// Model: the amplifier is an ideal inverting gain GAIN (no bandwidth limit,
// no noise, no time walk); the discriminator is ideal and followed by a fixed
// propagation delay DELAY_PS. The chip description gives only the function
// (negative analog pulse in, positive digital pulse out); the gain, delay
// and the threshold as an input voltage are this model's own choices.
//
// Interface: vin in volts (sensor side), vth in volts (at the amplifier
// output), disc is the digital pulse towards the input multiplexer.
module fe_model #(
  parameter real GAIN     = 20.0,   // inverting voltage gain
  parameter real DELAY_PS = 400.0   // discriminator output delay
) (
  input  real  vin,
  input  real  vth,
  output logic disc
);
  timeunit 1ps;
  timeprecision 1fs;

  real  vamp;
  logic above;

  always_comb vamp  = -GAIN * vin;
  always_comb above = (vamp > vth);

  assign #(DELAY_PS) disc = above;

endmodule
