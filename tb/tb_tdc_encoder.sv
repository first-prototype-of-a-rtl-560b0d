// Self-checking test of the encoder: every one of the 30 fine values, built
// as the ring's cyclic thermometer pattern by tdc_ref_pkg, with random
// coarse counts on all three channels, must come out as {coarse, value}.
// Patterns with a single flipped bit away from the transition (a bubble)
// must still decode to within one count.
module tb_tdc_encoder;
  timeunit 1ps;
  timeprecision 1fs;
  import latric0_pkg::*;
  import tdc_ref_pkg::*;

  raw_meas_t tot_raw, toa_raw, cal_raw;
  enc_meas_t tot_enc, toa_enc, cal_enc;
  int checks = 0, failures = 0;

  tdc_encoder dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int f = 0; f < 30; f++) begin
        int unsigned m_tot, m_toa, m_cal;
        m_tot = 30 * $urandom_range(0, 127) + f;
        m_toa = 30 * $urandom_range(0, 127) + (f + 7) % 30;
        m_cal = 30 * $urandom_range(0, 127) + (f + 19) % 30;
        tot_raw = raw_value(m_tot);
        toa_raw = raw_value(m_toa);
        cal_raw = raw_value(m_cal);
        #(1.0);
        check(tot_enc == enc_value(m_tot), "TOT");
        check(toa_enc == enc_value(m_toa), "TOA");
        check(cal_enc == enc_value(m_cal), "CAL");
      end
    end
    // bubble one place behind the transition in the lower half
    for (int f = 3; f < 15; f++) begin
      logic [29:0] w;
      int d;
      w = fine_word(f);
      w[f - 2] = 1'b0;
      tot_raw = '{coarse: 7'd5, fine: w};
      #(1.0);
      d = int'(tot_enc.fine) - f;
      check(tot_enc.coarse == 7'd5 && d >= -1 && d <= 1, "bubble within one count");
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
