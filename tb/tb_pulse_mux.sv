// Self-checking test of the input selector: all eight input combinations,
// then random toggling, against the expected selection.
module tb_pulse_mux;
  timeunit 1ps;
  timeprecision 1fs;

  logic sel_test_pulse, fe_pulse, test_pulse, pulse;
  int checks = 0, failures = 0;

  pulse_mux dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel_test_pulse, fe_pulse, test_pulse} = 3'(i);
      #(1.0);
      check(pulse == (i[2] ? i[0] : i[1]), "exhaustive");
    end
    for (int i = 0; i < 200; i++) begin
      {sel_test_pulse, fe_pulse, test_pulse} = 3'($urandom);
      #(1.0);
      check(pulse == (sel_test_pulse ? test_pulse : fe_pulse), "random");
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
