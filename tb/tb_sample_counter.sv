// tb_sample_counter - self-checking test of the sample timebase.
//
// Two instances: one with a short period (7 clocks) run through three full
// 64-sample cycles, checking tick spacing, phase, address stepping, addr_next
// and the 63 -> 0 wrap against a counter model kept by the testbench; and one
// at the default 1010-clock period, checking that ticks arrive every 1010
// clocks (99.0 kHz at 100 MHz).
module tb_sample_counter;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int unsigned DIV_S = 7;
  logic [5:0] addr_s, next_s, addr_d, next_d;
  logic       tick_s, tick_d;
  logic [2:0] phase_s;
  logic [9:0] phase_d;

  sample_counter #(.SAMPLE_DIV(DIV_S)) dut_s (
    .clk(clk), .rst_n(rst_n), .addr(addr_s), .addr_next(next_s), .tick(tick_s), .phase(phase_s));
  sample_counter dut_d (
    .clk(clk), .rst_n(rst_n), .addr(addr_d), .addr_next(next_d), .tick(tick_d), .phase(phase_d));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int wraps = 0;
  initial begin
    int unsigned t;
    int unsigned last_tick, nticks;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Model: clock t after reset release -> phase t%DIV, addr (t/DIV)%64
    for (t = 0; t < DIV_S * 64 * 3; t++) begin
      check(phase_s == 3'(t % DIV_S), "phase");
      check(addr_s == 6'((t / DIV_S) % 64), "addr");
      check(next_s == 6'((t / DIV_S) % 64 + 1), "addr_next");
      check(tick_s == ((t % DIV_S) == 0), "tick");
      if (t > 0 && (t % (DIV_S * 64)) == 0) begin
        check(addr_s == 6'd0, "wrap to 0");
        wraps++;
      end
      @(posedge clk); #1;
    end
    check(wraps == 2, "wraps seen");
    // Default-period instance: tick spacing
    last_tick = 0; nticks = 0;
    for (t = DIV_S * 64 * 3; t < 1010 * 20; t++) begin
      if (tick_d) begin
        check((t % 1010) == 0, "default tick spacing 1010");
        nticks++;
      end
      @(posedge clk); #1;
    end
    check(nticks >= 18, "default ticks counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
