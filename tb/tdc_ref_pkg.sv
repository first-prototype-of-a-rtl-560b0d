// Reference model for the LATRIC0 testbenches: what the TDC should report
// for a time interval, computed from the interval alone.
// A time t after the ring starts corresponds to m = floor(t / delay) cell
// delays; the coarse count is m / 30 (mod 128) and the fine phase word has,
// for f = m mod 30, phase[k] = (k < f) for k < 15 when f < 15, or
// phase[k] = (k >= f - 15) when f >= 15, and phase[15+k] = !phase[k].
package tdc_ref_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // Number of whole cell delays in dt.
  function automatic int unsigned cells(real dt, real delay);
    return int'($floor(dt / delay));
  endfunction

  // True when dt is so close to a cell boundary that the sampled value
  // depends on event ordering inside one simulation time step.
  function automatic bit on_boundary(real dt, real delay);
    real frac;
    frac = dt / delay - $floor(dt / delay);
    return (frac < 1.0e-4) || (frac > 1.0 - 1.0e-4);
  endfunction

  function automatic logic [29:0] fine_word(int unsigned f);
    logic [29:0] w;
    for (int k = 0; k < 15; k++) begin
      w[k]      = (f < 15) ? (k < f) : (k >= int'(f) - 15);
      w[15 + k] = !w[k];
    end
    return w;
  endfunction

  function automatic logic [36:0] raw_value(int unsigned m);
    return {7'(m / 30), fine_word(m % 30)};
  endfunction

  function automatic logic [11:0] enc_value(int unsigned m);
    return {7'(m / 30), 5'(m % 30)};
  endfunction
endpackage
