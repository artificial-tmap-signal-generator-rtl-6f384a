// tb_sd_modulator - self-checking test of the one-bit sigma-delta.
//
// For a series of input levels (0, full scale, mid-scale, random) the running
// count of ones must stay within 1.01 of the ideal count t * x / 4096 from the
// moment the level was applied (first-order modulators track the input
// integral to within one LSB of the feedback). Also checks that the density
// over 4096 clocks equals x within one count, and the clock enable.
module tb_sd_modulator;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] x = '0;
  logic        en = 1'b1, q;

  sd_modulator dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .q(q));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run_level(int unsigned lvl);
    int unsigned ones;
    real ideal, err, maxerr;
    @(negedge clk);
    x = 12'(lvl);
    ones = 0; maxerr = 0.0;
    for (int t = 1; t <= 4096; t++) begin
      ones += q;
      @(negedge clk);
      ideal = real'(t) * lvl / 4096.0;
      err = real'(ones) - ideal;
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
    end
    check(maxerr < 2.01, $sformatf("running error %f at level %0d", maxerr, lvl));
    check((ones + 1 >= lvl) && (ones <= lvl + 1), $sformatf("density %0d vs %0d", ones, lvl));
  endtask

  initial begin
    int unsigned ones;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_level(0);
    run_level(4095);
    run_level(2048);
    run_level(1);
    run_level(1000);
    for (int i = 0; i < 20; i++) run_level($urandom % 4096);
    // clock enable: output frozen while en is low
    @(negedge clk); x = 12'd1234; en = 1'b0;
    ones = 0;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk); ones += q;
    end
    check(ones == 0 || ones == 100, "output frozen with en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
