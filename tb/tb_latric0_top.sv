// End-to-end test of the LATRIC0 channel at its default parameters.
// A 720 MHz clock runs. Hits are sent in test-pulse mode (digital pulses at
// random sub-picosecond times) and in FE mode (negative triangular analog
// pulses of 16.8 mV peak through the front-end model). For every hit the
// testbench works out, from the times it observes itself, the expected TOA,
// CAL and TOT in cell delays, and compares them with the frames it
// deserializes from dout128 (raw: phases and coarse counts) and dout40
// (encoded). A receiver finds each frame by its first 1 bit on an idle line
// (header bit 0). It counts how often each mechanism occurred and fails the
// run if one never did: both input modes, arrival in either clock phase,
// pulses ending before R1, pulses outlasting R2, coarse counts above zero,
// a 210 ps pulse, a pulse ignored during a measurement. It also derives the
// LSB from CAL - TOA and the clock period, as the chip's self-calibration
// does, and checks that it matches the 30 ps cell delay.
module tb_latric0_top;
  timeunit 1ps;
  timeprecision 1fs;
  import latric0_pkg::*;
  import tdc_ref_pkg::*;

  localparam real CLK_PER  = 1.0e6 / 720.0;
  localparam real DELAY    = 30.0;    // cell delay, the top's default
  localparam real FE_GAIN  = 20.0;    // front-end model defaults
  localparam real FE_DELAY = 400.0;

  logic clk = 1'b0, rst_n = 1'b1, test_pulse = 1'b0, sel_test_pulse = 1'b1;
  real  fe_vin = 0.0, fe_vth = 0.15;
  logic dout128, dout40;

  int checks = 0, failures = 0;
  int n_test_mode = 0, n_fe_mode = 0, n_clk_high = 0, n_clk_low = 0;
  int n_before_r1 = 0, n_after_r2 = 0, n_coarse = 0, n_min_width = 0, n_ignored = 0;
  int cal_sum = 0, n_cal = 0;

  latric0_top dut (.*);

  always #(CLK_PER / 2.0) clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  // ---------------- serial receivers ----------------
  logic [127:0] rx128, last128;
  logic [39:0]  rx40, last40;
  int cnt128 = 0, cnt40 = 0, n_rx128 = 0, n_rx40 = 0;

  always @(negedge clk) begin
    if (cnt128 > 0 || dout128) begin
      rx128[cnt128] = dout128;
      cnt128++;
      if (cnt128 == 128) begin last128 = rx128; n_rx128++; cnt128 = 0; end
    end
    if (cnt40 > 0 || dout40) begin
      rx40[cnt40] = dout40;
      cnt40++;
      if (cnt40 == 40) begin last40 = rx40; n_rx40++; cnt40 = 0; end
    end
  end

  // ---------------- edge bookkeeping ----------------
  // Leading / trailing edge of the pulse at the TDC input, as the testbench
  // predicts it (test pulse directly, or threshold crossing + FE delay).
  task automatic expect_and_check(real t0, real tf, real r1, real r2, int rx_before128,
                                  int rx_before40);
    int unsigned m_toa, m_cal, m_tot;
    frame128_t f128;
    frame40_t  f40;
    wait (n_rx128 > rx_before128 && n_rx40 > rx_before40);
    f128 = last128;
    f40  = last40;
    m_toa = cells(r1 - t0, DELAY);
    m_cal = cells(r2 - t0, DELAY);
    m_tot = cells(tf - t0, DELAY);
    check(f128.header == HEADER128 && f40.header == HEADER40, "frame headers");
    if (!(on_boundary(r1 - t0, DELAY) || on_boundary(r2 - t0, DELAY) ||
          on_boundary(tf - t0, DELAY))) begin
      check(f128.toa == raw_value(m_toa), "raw TOA");
      check(f128.cal == raw_value(m_cal), "raw CAL");
      check(f128.tot == raw_value(m_tot), "raw TOT");
      check(f40.toa == enc_value(m_toa), "encoded TOA");
      check(f40.cal == enc_value(m_cal), "encoded CAL");
      check(f40.tot == enc_value(m_tot), "encoded TOT");
      if (failures > 0 && failures < 4)
        $display("  expected toa=%0d cal=%0d tot=%0d", m_toa, m_cal, m_tot);
    end
    // decoded from the encoded frame, independent of the expectation above
    cal_sum += (int'(f40.cal.coarse) * 30 + int'(f40.cal.fine)) -
               (int'(f40.toa.coarse) * 30 + int'(f40.toa.fine));
    n_cal++;
    if (tf < r1) n_before_r1++;
    if (tf > r2) n_after_r2++;
    if (f128.tot.coarse != 0) n_coarse++;
  endtask

  task automatic test_hit(real gap, real width, bit extra = 1'b0);
    real t0, tf, r1, r2;
    int b128, b40;
    sel_test_pulse = 1'b1;
    #(gap);
    b128 = n_rx128; b40 = n_rx40;
    if (clk) n_clk_high++; else n_clk_low++;
    test_pulse = 1'b1;
    t0 = $realtime;
    fork
      begin @(posedge clk); r1 = $realtime; @(posedge clk); r2 = $realtime; end
      begin
        #(width); test_pulse = 1'b0; tf = $realtime;
        if (extra && tf + 50.0 < t0 + CLK_PER) begin
          // another pulse during the same measurement, must be ignored
          #(50.0); test_pulse = 1'b1; #(100.0); test_pulse = 1'b0;
          n_ignored++;
        end
      end
    join
    n_test_mode++;
    if (width < 215.0) n_min_width++;
    expect_and_check(t0, tf, r1, r2, b128, b40);
  endtask

  // Negative triangular pulse through the front end; the TDC sees the
  // threshold crossings delayed by FE_DELAY.
  task automatic fe_hit(real gap, real peak, real rise, real fall);
    real t_start, t_on, t_off, t0, tf, r1, r2;
    int b128, b40;
    sel_test_pulse = 1'b0;
    #(gap);
    b128 = n_rx128; b40 = n_rx40;
    t_on = -1.0; t_off = -1.0;
    fork
      begin
        t_start = $realtime;
        for (int i = 1; i <= int'(rise + fall); i++) begin
          #(1.0);
          fe_vin = (i <= int'(rise)) ? peak * i / rise : peak * (rise + fall - i) / fall;
          if (-FE_GAIN * fe_vin > fe_vth && t_on < 0.0) t_on = $realtime;
          if (-FE_GAIN * fe_vin <= fe_vth && t_on >= 0.0 && t_off < 0.0) t_off = $realtime;
        end
        fe_vin = 0.0;
      end
      begin
        wait (t_on >= 0.0);
        #(FE_DELAY);
        if (clk) n_clk_high++; else n_clk_low++;
        @(posedge clk); r1 = $realtime; @(posedge clk); r2 = $realtime;
      end
    join
    t0 = t_on + FE_DELAY;
    tf = t_off + FE_DELAY;
    n_fe_mode++;
    expect_and_check(t0, tf, r1, r2, b128, b40);
  endtask

  initial begin
    real lsb;
    #(10.0) rst_n = 1'b0;
    #(3.3 * CLK_PER) rst_n = 1'b1;
    #(5.0 * CLK_PER);
    check(!dout128 && !dout40, "idle lines after reset");
    // test-pulse mode corner cases
    test_hit(300.0,    210.017);          // minimum detectable width
    test_hit(300.123,  40.371);           // ends before R1
    test_hit(300.456,  25000.777);        // long TOT, coarse count > 0
    test_hit(300.789,  500.5, 1'b1);      // second pulse ignored
    // FE mode
    for (int i = 0; i < 4; i++)
      fe_hit(400.0 + $urandom_range(0, 1400000) / 1000.0, -0.0168,
             200.0 + 10.0 * i, 1500.0 + 300.0 * i);
    // random test pulses, TOA / TOT scans as in the chip's characterisation
    for (int i = 0; i < 12; i++)
      test_hit(300.0 + $urandom_range(0, 1400000) / 1000.0,
               100.0 + $urandom_range(0, 25000000) / 1000.0, 1'(i % 3 == 0));
    #(200.0 * CLK_PER);
    check(cnt128 == 0 && cnt40 == 0, "no partial frame left");
    lsb = CLK_PER * n_cal / cal_sum;
    $display("calibrated LSB = %0.2f ps from %0d hits", lsb, n_cal);
    check(lsb > 29.5 && lsb < 30.5, "calibrated LSB");
    $display("test=%0d fe=%0d clk_high=%0d clk_low=%0d before_r1=%0d after_r2=%0d coarse=%0d min_width=%0d ignored=%0d",
             n_test_mode, n_fe_mode, n_clk_high, n_clk_low, n_before_r1, n_after_r2, n_coarse,
             n_min_width, n_ignored);
    check(n_test_mode > 0, "test-pulse mode used");
    check(n_fe_mode > 0, "FE mode used");
    check(n_clk_high > 0 && n_clk_low > 0, "arrival in both clock phases");
    check(n_before_r1 > 0, "pulse ending before R1");
    check(n_after_r2 > 0, "pulse outlasting R2");
    check(n_coarse > 0, "coarse counter advanced");
    check(n_min_width > 0, "210 ps pulse");
    check(n_ignored > 0, "pulse ignored during measurement");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(50.0e6);
    checks++; failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
