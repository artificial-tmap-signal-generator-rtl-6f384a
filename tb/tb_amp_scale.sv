// tb_amp_scale - self-checking test of the amplitude scaler.
//
// Drives random inputs and amplitude settings and compares the output one
// clock later with floor(x * (amp+1) / 256); also checks unity gain at 255.
module tb_amp_scale;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] x = '0, y;
  logic [7:0]  amp = '0;

  amp_scale dut (.clk(clk), .rst_n(rst_n), .x(x), .amp(amp), .y(y));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int unsigned ex;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      x = 12'($urandom);
      amp = (i % 5 == 0) ? 8'd255 : 8'($urandom);
      ex = (int'(x) * (int'(amp) + 1)) / 256;
      @(negedge clk);
      check(int'(y) == ex, $sformatf("y=%0d expected %0d", y, ex));
      if (amp == 8'd255) check(y == x, "unity gain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
