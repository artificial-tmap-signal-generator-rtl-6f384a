// tb_tmap_table - self-checking test of the waveform table.
//
// Checks the power-up contents against the template written out for n = 1
// (v(k) = 4095 * x * e^(1-x), x = B*k*Ts, rounded), checks the shape (zero at
// k = 0, peak at k = 7 near 0.067 ms), then writes random patterns through
// the write port and reads them back on both read ports.
module tb_tmap_table;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        we = 1'b0;
  logic [5:0]  waddr = '0, ra0 = '0, ra1 = '0;
  logic [11:0] wdata = '0, rd0, rd1;

  tmap_table dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                  .raddr0(ra0), .rdata0(rd0), .raddr1(ra1), .rdata1(rd1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [11:0] shadow [64];

  initial begin
    int unsigned peak_k, peak_v;
    real x;
    int  e;
    peak_k = 0; peak_v = 0;
    #1;
    for (int k = 0; k < 64; k++) begin
      x = 1.5e4 * k * 1.0e-5;
      e = $rtoi(4095.0 * x * $exp(1.0 - x) + 0.5);
      ra0 = 6'(k); ra1 = 6'(63 - k);
      #1;
      check(int'(rd0) == e, $sformatf("template sample %0d (%0d vs %0d)", k, rd0, e));
      if (rd0 > peak_v) begin peak_v = rd0; peak_k = k; end
    end
    ra0 = 0; #1; check(rd0 == 0, "sample 0 is zero");
    check(peak_k == 7, "peak position");
    check(peak_v >= 4085, "peak near full scale");
    // Random writes, read back on both ports
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < 64; k++) begin
        @(negedge clk);
        we = 1'b1; waddr = 6'(k); wdata = 12'($urandom); shadow[k] = wdata;
      end
      @(negedge clk); we = 1'b0;
      for (int k = 0; k < 64; k++) begin
        ra0 = 6'(k); ra1 = 6'($urandom);
        #1;
        check(rd0 == shadow[k], "read port 0 after write");
        check(rd1 == shadow[ra1], "read port 1 after write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
