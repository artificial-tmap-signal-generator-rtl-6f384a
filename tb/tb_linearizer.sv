// tb_linearizer - self-checking test of the straight-line interpolation.
//
// Feeds random sample pairs (cur, nxt) with a tick every 1010 clocks. With
// lin_en high the output in clock j after the tick must equal the ideal ramp
// cur + (nxt - cur) * (j-1) / 1010 within 2 LSB, be monotonic, and end within
// 2 LSB of where the line to nxt would be. With lin_en low it must hold cur.
module tb_linearizer;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        tick = 1'b0, lin_en = 1'b1;
  logic [11:0] cur = '0, nxt = '0, y;

  linearizer dut (.clk(clk), .rst_n(rst_n), .tick(tick), .cur(cur), .nxt(nxt),
                  .lin_en(lin_en), .y(y));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int ramps = 0, holds = 0;

  task automatic period(int unsigned c, int unsigned n, bit en);
    real ideal, err;
    int  prev;
    @(negedge clk);
    cur = 12'(c); nxt = 12'(n); lin_en = en; tick = 1'b1;
    @(negedge clk);
    tick = 1'b0;
    prev = int'(y);
    for (int j = 1; j <= 1010; j++) begin
      // y here is the value after j-1 slope steps
      if (en) begin
        ideal = real'(c) + (real'(n) - real'(c)) * real'(j - 1) / 1010.0;
        err = real'(y) - ideal;
        if (err < 0) err = -err;
        check(err <= 2.0, $sformatf("ramp y=%0d ideal=%f j=%0d", y, ideal, j));
        if (n >= c) check(int'(y) >= prev, "monotonic up");
        else        check(int'(y) <= prev, "monotonic down");
      end else begin
        check(y == 12'(c), "hold without linearization");
      end
      prev = int'(y);
      if (j < 1010) @(negedge clk);
    end
    if (en) ramps++; else holds++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    period(0, 4095, 1'b1);
    period(4095, 0, 1'b1);
    period(100, 100, 1'b1);
    for (int i = 0; i < 30; i++) period($urandom % 4096, $urandom % 4096, 1'b1);
    for (int i = 0; i < 5; i++) period($urandom % 4096, $urandom % 4096, 1'b0);
    check(ramps == 33 && holds == 5, "periods run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
