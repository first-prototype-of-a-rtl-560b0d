// Self-checking test of the LATRIC0 timing controller alone. For each hit it
// records every rising edge of the three latch strobes and checks them
// against clock edges the testbench observes itself: clk_latch2 at F0 (the
// first clk_ref falling edge: the arrival itself when clk is low, else the
// next clk fall) and at F1; clk_latch1 at R1 and R2 (the next two rising clk
// edges); tot_latch at the trailing edge; ro_key from the leading edge until
// the stop; clk_ref static high when idle and equal to clk while running;
// data_valid high for exactly one rising clk edge, on the first falling clk
// edge after both R2 and the trailing edge. A pulse arriving during a
// measurement must leave the strobe sequence unchanged.
module tb_timing_controller;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real CLK_PER = 1.0e6 / 720.0;

  logic clk = 1'b0, rst_n = 1'b1, pulse = 1'b0;
  logic ro_key, clk_ref, clk_latch1, clk_latch2, tot_latch, data_valid;

  int checks = 0, failures = 0;
  int n_l1, n_l2, n_tot, n_dv_edges;
  real t_l1 [4], t_l2 [4], t_tot;
  int n_ignored = 0, n_clk_low = 0, n_clk_high = 0, n_long = 0;

  timing_controller dut (.*);

  always #(CLK_PER / 2.0) clk = ~clk;

  always @(posedge clk_latch1) begin if (n_l1 < 4) t_l1[n_l1] = $realtime; n_l1++; end
  always @(posedge clk_latch2) begin if (n_l2 < 4) t_l2[n_l2] = $realtime; n_l2++; end
  always @(posedge tot_latch)  begin t_tot = $realtime; n_tot++; end
  always @(posedge clk) if (data_valid) n_dv_edges++;
  int  n_dv = 0;
  real t_dv;
  always @(posedge data_valid) begin t_dv = $realtime; n_dv++; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  task automatic hit(real gap, real width, bit extra = 1'b0);
    real t0, f0, r1, f1, r2, tf, tdv, tend;
    int dv_before;
    #(gap);
    n_l1 = 0; n_l2 = 0; n_tot = 0; n_dv_edges = 0;
    check(clk_ref == 1'b1 && !ro_key, "idle: clk_ref high, ro_key low");
    if (clk) n_clk_high++; else n_clk_low++;
    dv_before = n_dv;
    f0 = clk ? -1.0 : $realtime;
    pulse = 1'b1;
    t0 = $realtime;
    #(0.001);
    check(ro_key, "ro_key set by leading edge");
    fork
      begin
        if (f0 < 0.0) begin @(negedge clk); f0 = $realtime; end
        @(posedge clk); r1 = $realtime;
        @(negedge clk); f1 = $realtime;
        @(posedge clk); r2 = $realtime;
      end
      begin
        #(width - 0.001); pulse = 1'b0; tf = $realtime;
        if (extra) begin
          #(200.0);
          if (ro_key) begin n_ignored++; pulse = 1'b1; #(150.0); pulse = 1'b0; end
        end
      end
      begin
        #(CLK_PER / 4.0);
        if (ro_key) check(clk_ref == clk, "clk_ref follows clk while running");
      end
    join
    wait (n_dv > dv_before);
    tdv = t_dv;
    tend = (tf > r2) ? tf : r2;
    check(!clk && tdv > tend && tdv - tend <= CLK_PER + 0.01, "data_valid on next falling edge");
    #(0.001);
    check(!ro_key, "ro_key cleared by stop");
    if (data_valid) @(negedge clk);
    #(0.001);
    check(!data_valid && n_dv_edges == 1, "data_valid for one rising edge");
    check(n_l1 == 2 && near(t_l1[0], r1) && near(t_l1[1], r2), "clk_latch1 at R1 and R2");
    check(n_l2 == 2 && near(t_l2[0], f0) && near(t_l2[1], f1), "clk_latch2 at F0 and F1");
    check(n_tot == 1 && near(t_tot, tf), "tot_latch at trailing edge");
    if (width > 2.0 * CLK_PER) n_long++;
  endtask

  initial begin
    #(10.0);
    rst_n = 1'b0;
    #(3.3 * CLK_PER);
    rst_n = 1'b1;
    hit(1000.123, 300.0);
    hit(1400.777, 5000.0, 1'b1);
    hit(1234.567, 80.0, 1'b1);
    for (int i = 0; i < 40; i++)
      hit(700.0 + $urandom_range(0, 3000000) / 1000.0,
          30.0 + $urandom_range(0, 6000000) / 1000.0, 1'($urandom_range(0, 1)));
    check(n_ignored > 0 && n_clk_low > 0 && n_clk_high > 0 && n_long > 0, "all cases exercised");
    $display("ignored=%0d clk_low=%0d clk_high=%0d long=%0d", n_ignored, n_clk_low, n_clk_high, n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100.0e6);
    checks++; failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
