// tb_scrambler - self-checking test of the bit-reversal scrambler.
//
// A 3-bit instance receives the frame 11111000 (five ones in eight slots) and
// must play it out in the next frame as 11101010. A 10-bit instance (the
// default) receives random frames; each output slot i of frame f+1 must equal
// input bit bitrev(i) of frame f, so every frame keeps its count of ones.
// Output must be 0 while the first frame is being stored.
module tb_scrambler;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic din3 = 1'b0, dout3, v3;
  logic din = 1'b0, dout, v;

  scrambler #(.F(3)) dut3 (.clk(clk), .rst_n(rst_n), .en(1'b1), .din(din3), .dout(dout3), .valid(v3));
  scrambler          dut  (.clk(clk), .rst_n(rst_n), .en(1'b1), .din(din),  .dout(dout),  .valid(v));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int unsigned rev(int unsigned i, int unsigned f);
    int unsigned r = 0;
    for (int b = 0; b < int'(f); b++) if (i & (1 << b)) r |= 1 << (f - 1 - b);
    return r;
  endfunction

  // Clock t (0 = first clock after reset) carries input slot t; the output
  // for slot t is visible after the following edge (registered).
  logic hist [4096];
  logic [7:0] pat3 = 8'b0001_1111;   // slot 0 first: 1,1,1,1,1,0,0,0
  logic [7:0] got3;

  initial begin
    int unsigned ones_in, ones_out;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 4 * 1024; t++) begin
      din3 = (t < 16) ? pat3[t % 8] : 1'b0;
      din  = 1'($urandom);
      hist[t] = din;
      @(posedge clk); #1;
      // dout now belongs to slot t
      if (t < 8) check(dout3 == 1'b0, "3-bit: quiet during first frame");
      if (t >= 8 && t < 16) got3[t - 8] = dout3;
      if (t < 1024) check(dout == 1'b0, "10-bit: quiet during first frame");
      else check(dout == hist[(t / 1024 - 1) * 1024 + rev(t % 1024, 10)], "10-bit: bit-reversed order");
      @(negedge clk);
    end
    check(got3 == 8'b0101_0111, $sformatf("3-bit frame 11111000 -> %b%b%b%b%b%b%b%b",
          got3[0], got3[1], got3[2], got3[3], got3[4], got3[5], got3[6], got3[7]));
    // duty preserved per frame
    for (int f = 1; f < 3; f++) begin
      ones_in = 0;
      for (int i = 0; i < 1024; i++) ones_in += hist[(f - 1) * 1024 + i];
      ones_out = 0;
      for (int i = 0; i < 1024; i++) ones_out += hist[(f - 1) * 1024 + rev(i, 10)];
      check(ones_in == ones_out, "frame duty kept");
    end
    check(v && v3, "valid after first frame");
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
