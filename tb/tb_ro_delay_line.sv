// Self-checking test of the ring-oscillator model. With RO_key low the 30
// phases must settle to the reset pattern (lower half 0, upper half 1).
// After RO_key rises at t0, sampling in the middle of every cell interval m
// must show the cyclic thermometer pattern of fine value m mod 30 (computed
// by tdc_ref_pkg), the last phase must rise once per 30 cells (period
// 900 ps), and dropping RO_key must return the ring to the reset pattern.
module tb_ro_delay_line;
  timeunit 1ps;
  timeprecision 1fs;
  import tdc_ref_pkg::*;

  localparam real DELAY = 30.0;

  logic        ro_key = 1'b0;
  logic [29:0] phase;
  int checks = 0, failures = 0;
  int n_wrap = 0;
  real t_wrap [8];

  ro_delay_line #(.STAGE_DELAY_PS(DELAY)) dut (.ro_key(ro_key), .phase(phase));

  always @(posedge phase[29]) if (ro_key) begin
    if (n_wrap < 8) t_wrap[n_wrap] = $realtime;
    n_wrap++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  initial begin
    real t0;
    for (int run = 0; run < 3; run++) begin
      #(1000.0);
      check(phase == 30'h3FFF_8000, "reset pattern");
      n_wrap = 0;
      ro_key = 1'b1;
      t0 = $realtime;
      for (int m = 0; m < 150; m++) begin
        #(t0 + (real'(m) + 0.5) * DELAY - $realtime);
        check(phase == fine_word(m % 30), "phase pattern");
      end
      check(n_wrap == 4, "one wrap per 30 cells");
      for (int i = 0; i < 4; i++)
        check(t_wrap[i] - t0 > 30.0 * DELAY * (i + 1) - 0.01 &&
              t_wrap[i] - t0 < 30.0 * DELAY * (i + 1) + 0.01, "wrap time");
      ro_key = 1'b0;
    end
    #(1000.0);
    check(phase == 30'h3FFF_8000, "reset pattern after stop");
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
