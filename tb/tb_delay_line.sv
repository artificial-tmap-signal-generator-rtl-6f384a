// tb_delay_line - self-checking test of the programmable bit delay.
//
// Random bits go in; the output must equal the input of 1 + delay clocks
// earlier, for delays 0, 1, 5000, a random value and the maximum 65535, with
// the delay changed on the fly. Before 'delay' bits have been written the
// output must be 0.
module tb_delay_line;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        din = 1'b0, dout;
  logic [15:0] delay = 16'd5000;

  delay_line dut (.clk(clk), .rst_n(rst_n), .din(din), .delay(delay), .dout(dout));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  localparam int TOTAL = 300000;
  logic hist [TOTAL];
  int   changes = 0;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < TOTAL; t++) begin
      // t = clock index after reset; pick the delay for this clock
      if (t == 20000)  begin delay = 16'd0;     changes++; end
      if (t == 30000)  begin delay = 16'd1;     changes++; end
      if (t == 40000)  begin delay = 16'($urandom); changes++; end
      if (t == 100000) begin delay = 16'd65535; changes++; end
      din = 1'($urandom);
      hist[t] = din;
      @(posedge clk); #1;
      // dout now = din of clock t - delay
      if (t < int'(delay)) check(dout == 1'b0, "quiet before fill");
      else check(dout == hist[t - int'(delay)], $sformatf("delayed bit, delay %0d", delay));
      @(negedge clk);
    end
    check(changes == 4, "delay changes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (TOTAL + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
