// Self-checking test of the shift-register serializer at both sizes used in
// the chip (128 and 40 bits). Random words are loaded; the serial output is
// checked bit by bit, least significant bit first, in the cycles after the
// load edge, and must return to 0 once the word is out. A load while a
// frame is still leaving must restart with the new word.
module tb_shift_serializer;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real CLK_PER = 1.0e6 / 720.0;

  logic clk = 1'b0, rst_n = 1'b1, load = 1'b0;
  logic [127:0] din128 = '0;
  logic [39:0]  din40  = '0;
  logic dout128, dout40;
  int checks = 0, failures = 0;

  shift_serializer #(.WIDTH(128)) u128 (.clk, .rst_n, .load, .din(din128), .dout(dout128));
  shift_serializer #(.WIDTH(40))  u40  (.clk, .rst_n, .load, .din(din40),  .dout(dout40));

  always #(CLK_PER / 2.0) clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  task automatic send(int cut);
    logic [127:0] w128;
    logic [39:0]  w40;
    w128 = {$urandom, $urandom, $urandom, $urandom};
    w40  = {8'($urandom), $urandom};
    @(negedge clk);
    din128 = w128; din40 = w40; load = 1'b1;
    @(negedge clk);
    load = 1'b0; din128 = '0; din40 = '0;
    for (int i = 0; i < 140 && i < cut; i++) begin
      check(dout128 == ((i < 128) ? w128[i] : 1'b0), "dout128 bit");
      check(dout40  == ((i < 40)  ? w40[i]  : 1'b0), "dout40 bit");
      if (i + 1 < cut) @(negedge clk);
    end
  endtask

  initial begin
    #(10.0) rst_n = 1'b0;
    #(2.0 * CLK_PER) rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!dout128 && !dout40, "idle after reset");
    for (int k = 0; k < 20; k++) send((k % 5 == 4) ? 20 : 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1.0e7);
    checks++; failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
