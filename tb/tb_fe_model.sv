// Self-checking test of the front-end model. A negative triangular pulse
// (peak -16.8 mV, the amplitude used in the chip's front-end test) is applied
// in 1 ps steps; the digital output must be high exactly while the amplified
// signal (-20 x input) is above the threshold, delayed by 400 ps. A pulse
// below threshold must give no output, and a positive pulse none either.
module tb_fe_model;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real GAIN  = 20.0;
  localparam real DELAY = 400.0;

  real  vin = 0.0, vth = 0.15;
  logic disc;
  int checks = 0, failures = 0;
  int n_pulses = 0;

  fe_model #(.GAIN(GAIN), .DELAY_PS(DELAY)) dut (.vin(vin), .vth(vth), .disc(disc));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  // Triangle: linear to `peak` volts over `rise` ps, back to 0 over `fall` ps.
  // Records the expected threshold crossing times.
  task automatic shape(real peak, real rise, real fall, output real t_on, output real t_off);
    real t0;
    t0 = $realtime;
    t_on = -1.0; t_off = -1.0;
    for (int i = 1; i <= int'(rise + fall); i++) begin
      #(1.0);
      vin = (i <= int'(rise)) ? peak * i / rise : peak * (rise + fall - i) / fall;
      if (-GAIN * vin > vth && t_on < 0.0) t_on = $realtime;
      if (-GAIN * vin <= vth && t_on >= 0.0 && t_off < 0.0) t_off = $realtime;
    end
    vin = 0.0;
    if (t_on >= 0.0 && t_off < 0.0) t_off = $realtime;
  endtask

  real t_rise_seen, t_fall_seen;
  always @(posedge disc) begin t_rise_seen = $realtime; n_pulses++; end
  always @(negedge disc) t_fall_seen = $realtime;

  initial begin
    real t_on, t_off;
    int n0;
    #(2000.0);
    check(!disc, "idle low");
    for (int k = 0; k < 10; k++) begin
      vth = 0.05 + 0.02 * k;
      n0 = n_pulses;
      shape(-0.0168, 300.0 + 20.0 * k, 1500.0, t_on, t_off);
      #(2.0 * DELAY);
      check(n_pulses == n0 + 1, "one output pulse");
      check(t_rise_seen - t_on > DELAY - 0.01 && t_rise_seen - t_on < DELAY + 0.01, "leading edge");
      check(t_fall_seen - t_off > DELAY - 0.01 && t_fall_seen - t_off < DELAY + 0.01, "trailing edge");
    end
    vth = 0.5;
    n0 = n_pulses;
    shape(-0.0168, 300.0, 1500.0, t_on, t_off);
    #(2.0 * DELAY);
    check(n_pulses == n0, "below threshold: no pulse");
    vth = 0.1;
    shape(0.0168, 300.0, 1500.0, t_on, t_off);
    #(2.0 * DELAY);
    check(n_pulses == n0, "positive input: no pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1.0e6);
    checks++; failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
