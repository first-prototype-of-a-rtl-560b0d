// Self-checking test of the coarse counter: it must count rising edges of
// the period input only while RO_key is high, clear as soon as RO_key or
// rst_n goes low, and wrap from 127 to 0.
module tb_coarse_counter;
  timeunit 1ps;
  timeprecision 1fs;

  logic       rst_n = 1'b1, ro_key = 1'b0, ro_period = 1'b0;
  logic [6:0] count;
  int checks = 0, failures = 0;
  int expected;

  coarse_counter dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: count=%0d expected=%0d", what, $realtime, count, expected);
    end
  endtask

  task automatic tick();
    #(450.0) ro_period = 1'b1;
    #(450.0) ro_period = 1'b0;
  endtask

  initial begin
    #(10.0) rst_n = 1'b0;
    #(10.0) rst_n = 1'b1;
    expected = 0;
    check(count == 0, "cleared by reset");
    repeat (5) tick();
    check(count == 0, "held while RO_key low");
    for (int run = 0; run < 4; run++) begin
      int n;
      n = (run == 3) ? 140 : int'($urandom_range(1, 60));
      ro_key = 1'b1;
      expected = 0;
      for (int i = 0; i < n; i++) begin
        tick();
        expected = (expected + 1) % 128;
        check(count == 7'(expected), "counting");
      end
      ro_key = 1'b0;
      #(1.0);
      expected = 0;
      check(count == 0, "cleared by RO_key");
    end
    ro_key = 1'b1;
    repeat (3) tick();
    rst_n = 1'b0;
    #(1.0);
    check(count == 0, "cleared by rst_n");
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
