// Encoder of the LATRIC0 TDC core: converts the 30-bit fine phase word of
// each measurement into a 5-bit binary fine time (0..29) and keeps the 7-bit
// coarse count, giving three 12-bit values (36 bits of encoded data).
//
// The 30 phases sampled from the ring form a cyclic thermometer pattern:
// for fine value m < 15 the lower half phase[14:0] holds m ones from bit 0
// up and phase[14] is 0; for m >= 15 phase[14] is 1 and the upper half
// phase[29:15] holds m-15 ones. The encoder therefore counts ones in the half
// selected by phase[14], which also tolerates an isolated bubble.
// Combinational. The 30-to-5 conversion is from the chip description; the
// ones-counting method is this design's choice.
module tdc_encoder
  import latric0_pkg::*;
(
  input  raw_meas_t tot_raw,
  input  raw_meas_t toa_raw,
  input  raw_meas_t cal_raw,
  output enc_meas_t tot_enc,
  output enc_meas_t toa_enc,
  output enc_meas_t cal_enc
);
  timeunit 1ps;
  timeprecision 1fs;

  function automatic logic [FINE_BIN_W-1:0] fine_to_bin(input logic [N_PHASES-1:0] ph);
    logic [FINE_BIN_W-1:0] ones;
    ones = '0;
    if (ph[N_STAGES-1]) begin
      for (int i = N_STAGES; i < N_PHASES; i++) ones += FINE_BIN_W'(ph[i]);
      return FINE_BIN_W'(N_STAGES) + ones;
    end else begin
      for (int i = 0; i < N_STAGES; i++) ones += FINE_BIN_W'(ph[i]);
      return ones;
    end
  endfunction

  always_comb begin
    tot_enc = '{coarse: tot_raw.coarse, fine: fine_to_bin(tot_raw.fine)};
    toa_enc = '{coarse: toa_raw.coarse, fine: fine_to_bin(toa_raw.fine)};
    cal_enc = '{coarse: cal_raw.coarse, fine: fine_to_bin(cal_raw.fine)};
  end

endmodule
