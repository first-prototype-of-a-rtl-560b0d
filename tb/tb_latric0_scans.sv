// Transfer-curve scans of the LATRIC0 channel in test-pulse mode, with the
// top at its default parameters and a 720 MHz clock:
//   TOA coarse: pulse delay after a clock edge scanned over 25 ns, 1 ns step
//   TOA fine  : delay scanned over 1 ns, 6 ps step
//   TOT coarse: pulse width scanned over 25 ns, 1 ns step
//   TOT fine  : width scanned from 5 ns to 6 ns, 10 ps step
// Every point is read back from the serial 40-bit encoded frame and compared
// with the code expected from the applied times. From the fine scans the
// testbench fits the LSB (time step per code) by least squares, derives the
// LSB from CAL - TOA and the clock period (self-calibration), and computes
// the differential nonlinearity of the codes crossed; all LSBs must be
// 30 ps within 0.5 ps and the DNL within +-1 LSB.
module tb_latric0_scans;
  timeunit 1ps;
  timeprecision 1fs;
  import latric0_pkg::*;
  import tdc_ref_pkg::*;

  localparam real CLK_PER = 1.0e6 / 720.0;
  localparam real DELAY   = 30.0;

  logic clk = 1'b0, rst_n = 1'b1, test_pulse = 1'b0, sel_test_pulse = 1'b1;
  real  fe_vin = 0.0, fe_vth = 0.15;
  logic dout128, dout40;

  int checks = 0, failures = 0;

  latric0_top dut (.*);

  always #(CLK_PER / 2.0) clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  // 40-bit frame receiver: a frame starts with the first 1 on an idle line.
  logic [39:0] rx40, last40;
  int cnt40 = 0, n_rx40 = 0;
  always @(negedge clk) begin
    if (cnt40 > 0 || dout40) begin
      rx40[cnt40] = dout40;
      cnt40++;
      if (cnt40 == 40) begin last40 = rx40; n_rx40++; cnt40 = 0; end
    end
  end

  function automatic int code(enc_meas_t e);
    return int'(e.coarse) * 30 + int'(e.fine);
  endfunction

  // One hit `delay` ps after a rising clock edge, `width` ps wide.
  // Returns the TOA, TOT and CAL codes read from the serial frame.
  task automatic hit(real delay, real width, output int toa, output int tot, output int cal);
    real t0, tf, r1, r2;
    int n_prev;
    frame40_t f;
    repeat (8) @(posedge clk);
    #(delay);
    n_prev = n_rx40;
    test_pulse = 1'b1;
    t0 = $realtime;
    fork
      begin @(posedge clk); r1 = $realtime; @(posedge clk); r2 = $realtime; end
      begin #(width); test_pulse = 1'b0; tf = $realtime; end
    join
    wait (n_rx40 > n_prev);
    f = last40;
    toa = code(f.toa);
    tot = code(f.tot);
    cal = code(f.cal);
    check(f.header == HEADER40, "header");
    if (!on_boundary(r1 - t0, DELAY)) check(toa == cells(r1 - t0, DELAY), "TOA code");
    if (!on_boundary(r2 - t0, DELAY)) check(cal == cells(r2 - t0, DELAY), "CAL code");
    if (!on_boundary(tf - t0, DELAY)) check(tot == cells(tf - t0, DELAY), "TOT code");
  endtask

  // least-squares slope of y over x
  function automatic real slope(real sx, real sy, real sxx, real sxy, int n);
    return (n * sxy - sx * sy) / (n * sxx - sx * sx);
  endfunction

  initial begin
    int toa, tot, cal, n;
    real sx, sy, sxx, sxy, lsb, cal_sum;
    int hist [int];
    int lo, hi;
    real dnl, dnl_max;
    #(10.0) rst_n = 1'b0;
    #(3.3 * CLK_PER) rst_n = 1'b1;

    // TOA coarse scan (sawtooth over the clock period)
    for (int i = 0; i <= 25; i++) hit(1000.0 * i + 0.37, 300.0, toa, tot, cal);

    // TOA fine scan over 1 ns, 6 ps step: code falls as the delay grows
    sx = 0; sy = 0; sxx = 0; sxy = 0; n = 0; cal_sum = 0;
    for (int i = 0; i < 167; i++) begin
      real d;
      d = 200.0 + 6.0 * i + 0.013;
      hit(d, 300.0, toa, tot, cal);
      sx += d; sy += toa; sxx += d * d; sxy += d * toa; n++;
      cal_sum += cal - toa;
      if (hist.exists(toa)) hist[toa]++; else hist[toa] = 1;
    end
    lsb = -1.0 / slope(sx, sy, sxx, sxy, n);
    $display("TOA fine scan: fitted LSB = %0.2f ps", lsb);
    check(lsb > 29.5 && lsb < 30.5, "TOA LSB");
    lsb = CLK_PER / (cal_sum / n);
    $display("calibrated LSB from CAL - TOA = %0.2f ps", lsb);
    check(lsb > 29.5 && lsb < 30.5, "calibrated LSB");
    // DNL of the inner codes (the end codes are cut by the scan range)
    void'(hist.first(lo)); void'(hist.last(hi));
    dnl_max = 0.0;
    for (int c = lo + 1; c < hi; c++) begin
      dnl = (hist.exists(c) ? hist[c] : 0) * 6.0 / DELAY - 1.0;
      if (dnl > dnl_max) dnl_max = dnl;
      if (-dnl > dnl_max) dnl_max = -dnl;
    end
    $display("TOA DNL max = %0.2f LSB over codes %0d..%0d", dnl_max, lo + 1, hi - 1);
    check(dnl_max < 1.0, "TOA DNL within 1 LSB");

    // TOT coarse scan
    for (int i = 1; i <= 25; i++) hit(500.21, 1000.0 * i + 0.41, toa, tot, cal);

    // TOT fine scan 5..6 ns, 10 ps step
    sx = 0; sy = 0; sxx = 0; sxy = 0; n = 0;
    hist.delete();
    for (int i = 0; i <= 100; i++) begin
      real w;
      w = 5000.0 + 10.0 * i + 0.029;
      hit(500.21, w, toa, tot, cal);
      sx += w; sy += tot; sxx += w * w; sxy += w * tot; n++;
      if (hist.exists(tot)) hist[tot]++; else hist[tot] = 1;
    end
    lsb = 1.0 / slope(sx, sy, sxx, sxy, n);
    $display("TOT fine scan: fitted LSB = %0.2f ps", lsb);
    check(lsb > 29.5 && lsb < 30.5, "TOT LSB");
    void'(hist.first(lo)); void'(hist.last(hi));
    dnl_max = 0.0;
    for (int c = lo + 1; c < hi; c++) begin
      dnl = (hist.exists(c) ? hist[c] : 0) * 10.0 / DELAY - 1.0;
      if (dnl > dnl_max) dnl_max = dnl;
      if (-dnl > dnl_max) dnl_max = -dnl;
    end
    $display("TOT DNL max = %0.2f LSB over codes %0d..%0d", dnl_max, lo + 1, hi - 1);
    check(dnl_max < 1.0, "TOT DNL within 1 LSB");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(500.0e6);
    checks++; failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
