// Self-checking test of the three latch groups. Random phase words and
// coarse counts are presented; the testbench plays the strobe sequence of
// one measurement (clk_latch2 at F0, clk_latch1 at R1, tot_latch, clk_latch2
// at F1, clk_latch1 at R2) and checks that in the end group2 holds the R1
// sample (TOA), group1 the R2 sample (CAL) and group3 the trailing-edge
// sample (TOT), and that inputs changing between strobes are not taken.
module tb_latch_groups;
  timeunit 1ps;
  timeprecision 1fs;
  import latric0_pkg::*;

  logic clk_latch1 = 1'b0, clk_latch2 = 1'b0, tot_latch = 1'b0;
  logic [29:0] phase = '0;
  logic [6:0]  coarse = '0;
  raw_meas_t group1, group2, group3;
  int checks = 0, failures = 0;

  latch_groups dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  task automatic present(output raw_meas_t v);
    phase  = 30'($urandom);
    coarse = 7'($urandom);
    v = '{coarse: coarse, fine: phase};
    #(10.0);
  endtask

  task automatic strobe(ref logic s);
    s = 1'b1;
    #(20.0);
    s = 1'b0;
    #(20.0);
  endtask

  initial begin
    raw_meas_t v_toa, v_cal, v_tot, v_junk;
    for (int i = 0; i < 50; i++) begin
      present(v_junk); strobe(clk_latch2);              // F0
      present(v_toa);  strobe(clk_latch1);              // R1: TOA
      check(group1 == v_toa, "group1 holds TOA after R1");
      present(v_tot);
      if (i % 2 == 0) strobe(tot_latch);                // short pulse: TOT early
      present(v_junk); strobe(clk_latch2);              // F1
      check(group2 == v_toa, "group2 holds TOA after F1");
      present(v_cal);  strobe(clk_latch1);              // R2: CAL
      if (i % 2 == 1) begin present(v_tot); strobe(tot_latch); end  // long pulse
      present(v_junk);                                  // ring keeps moving
      check(group1 == v_cal, "group1 = CAL");
      check(group2 == v_toa, "group2 = TOA");
      check(group3 == v_tot, "group3 = TOT");
    end
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
