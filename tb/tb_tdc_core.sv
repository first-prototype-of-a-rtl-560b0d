// Self-checking test of the LATRIC0 TDC core with its ring-oscillator model.
// A 720 MHz clock runs; hits arrive at random sub-picosecond times with
// random widths. For every hit the testbench records the leading edge, the
// next two rising clock edges (R1, R2) and the trailing edge, and predicts
// TOA, CAL and TOT in cell delays with tdc_ref_pkg. It checks raw fields,
// encoded fields, CAL - TOA against the clock period, and that data_valid
// comes on the first falling clock edge after both R2 and the trailing edge.
// Also covered: pulses longer than two clock periods, 210 ps pulses, and a
// second pulse during a measurement, which must be ignored.
module tb_tdc_core;
  timeunit 1ps;
  timeprecision 1fs;
  import latric0_pkg::*;
  import tdc_ref_pkg::*;

  localparam real CLK_PER = 1.0e6 / 720.0;   // ps
  localparam real DELAY   = 30.0;            // ps per cell

  logic clk = 1'b0, rst_n = 1'b1, pulse = 1'b0;
  logic ro_key, data_valid;
  raw_meas_t tot_raw, toa_raw, cal_raw;
  enc_meas_t tot_enc, toa_enc, cal_enc;

  int checks = 0, failures = 0;
  int n_long = 0, n_short = 0, n_ignored = 0, n_clk_high = 0, n_clk_low = 0;

  tdc_core #(.STAGE_DELAY_PS(DELAY)) dut (.*);

  always #(CLK_PER / 2.0) clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  // One hit: wait `gap` ps, pulse for `width` ps; optionally a second pulse
  // `extra_at` ps after the leading edge while the first is still measured.
  task automatic hit(real gap, real width, real extra_at = -1.0);
    real t0, r1, r2, tf, tdv, tend;
    int unsigned m_toa, m_cal, m_tot;
    bit skip;
    #(gap);
    if (clk) n_clk_high++; else n_clk_low++;
    pulse = 1'b1;
    t0 = $realtime;
    fork
      begin @(posedge clk); r1 = $realtime; @(posedge clk); r2 = $realtime; end
      begin #(width); pulse = 1'b0; tf = $realtime; end
    join
    if (extra_at > 0.0) begin
      // a second, short pulse before data_valid: must not disturb anything
      #(1.0);
      if (ro_key) begin
        pulse = 1'b1; #(100.3); pulse = 1'b0;
        n_ignored++;
      end
    end
    @(posedge data_valid);
    tdv = $realtime;
    m_toa = cells(r1 - t0, DELAY);
    m_cal = cells(r2 - t0, DELAY);
    m_tot = cells(tf - t0, DELAY);
    skip = on_boundary(r1 - t0, DELAY) || on_boundary(r2 - t0, DELAY) ||
           on_boundary(tf - t0, DELAY);
    if (!skip) begin
      check(toa_raw == raw_value(m_toa), "TOA raw");
      check(cal_raw == raw_value(m_cal), "CAL raw");
      check(tot_raw == raw_value(m_tot), "TOT raw");
      check(toa_enc == enc_value(m_toa), "TOA encoded");
      check(cal_enc == enc_value(m_cal), "CAL encoded");
      check(tot_enc == enc_value(m_tot), "TOT encoded");
      check((m_cal - m_toa == 46) || (m_cal - m_toa == 47), "CAL-TOA = clock period");
      if (failures != 0 && failures < 4)
        $display("  t0=%0.3f toa=%0d cal=%0d tot=%0d got toa=%0d/%0d cal=%0d/%0d tot=%0d/%0d",
                 t0, m_toa, m_cal, m_tot, toa_enc.coarse, toa_enc.fine,
                 cal_enc.coarse, cal_enc.fine, tot_enc.coarse, tot_enc.fine);
    end
    // data_valid on the first falling clock edge after R2 and the trailing edge
    tend = (tf > r2) ? tf : r2;
    check(!clk && (tdv > tend) && (tdv - tend <= CLK_PER + 1.0), "data_valid timing");
    @(negedge clk);
    #(1.0);
    check(!ro_key && !data_valid, "stopped after data_valid");
    if (width > 2.0 * CLK_PER) n_long++;
    if (width < 250.0) n_short++;
  endtask

  initial begin
    #(10.0);
    rst_n = 1'b0;   // a real falling edge, so every asynchronous reset acts
    #(3.3 * CLK_PER);
    rst_n = 1'b1;
    #(2.0 * CLK_PER);
    check(!ro_key && !data_valid, "idle after reset");
    // fixed corner cases: minimum pulse width, pulse ending before R1,
    // long pulses beyond R2, and a pulse arriving during a measurement
    hit(1000.123, 210.017);
    hit(1500.257, 35.511);
    hit(2000.471, 25000.333);
    hit(2000.613, 5432.109);
    hit(1700.011, 600.25, 300.0);
    hit(1900.707, 4000.5, 700.0);
    // random hits
    for (int i = 0; i < 60; i++)
      hit(600.0 + $urandom_range(0, 2000000) / 1000.0,
          50.0 + $urandom_range(0, 30000000) / 1000.0);
    check(n_long > 0 && n_short > 0 && n_ignored > 0 && n_clk_high > 0 && n_clk_low > 0,
          "all cases exercised");
    $display("long=%0d short=%0d ignored=%0d clk_high=%0d clk_low=%0d",
             n_long, n_short, n_ignored, n_clk_high, n_clk_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(200.0e6);  // 200 us
    checks++; failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
