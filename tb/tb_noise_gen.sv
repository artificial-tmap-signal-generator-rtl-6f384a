// tb_noise_gen - self-checking test of one noise channel.
//
// A 7-bit instance (taps 7 and 6, a maximal-length trinomial) must repeat its
// raw LFSR bit with period 127 shift steps, match a shift-register model kept
// by the testbench, and shift exactly once every div+1 clocks. With a slow
// divider (256 clocks per LFSR bit) the number of ones of q in each LFSR bit
// interval must be 128 +/- level/2 (times 256/256) within 2, which shows that
// the 8-bit level sets the noise amplitude; level 0 must give a 50 % stream.
// The default 23-bit instance is checked for roughly balanced output.
module tb_noise_gen;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] div = 8'd0, level = 8'd0;
  logic       q7, b7, qd, bd;

  noise_gen #(.LEN(7), .TAP(6), .SEED(7'h5A)) dut7 (
    .clk(clk), .rst_n(rst_n), .div(div), .level(level), .q(q7), .lfsr_bit(b7));
  noise_gen dutd (
    .clk(clk), .rst_n(rst_n), .div(div), .level(level), .q(qd), .lfsr_bit(bd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [6:0] m;
    logic       seq [254];
    int unsigned ones, ones_d, expect_ones;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // div = 0: one shift per clock; model the register independently
    m = 7'h5A;
    for (int t = 0; t < 254; t++) begin
      check(b7 == m[6], "LFSR bit matches model");
      seq[t] = b7;
      m = {m[5:0], m[6] ^ m[5]};
      @(negedge clk);
    end
    for (int t = 0; t < 127; t++) check(seq[t] == seq[t + 127], "period 127");
    ones = 0;
    for (int t = 0; t < 127; t++) ones += seq[t];
    check(ones == 64, "maximal sequence has 64 ones");
    // div = 3: shift every 4 clocks
    @(negedge clk); div = 8'd3;
    repeat (8) @(negedge clk);
    begin
      int changes = 0; logic last = b7;
      for (int t = 0; t < 400; t++) begin
        @(negedge clk);
        if (b7 != last) changes++;
        last = b7;
      end
      check(changes <= 100 && changes >= 25, $sformatf("divided shift rate (%0d changes)", changes));
    end
    // level sets the amplitude: ones per LFSR interval of 256 clocks
    div = 8'd255;
    // align once to an LFSR step; from then on steps come every 256 clocks
    begin logic last = b7; int guard = 0;
      while (b7 == last && guard < 2000) begin @(negedge clk); guard++; end
    end
    for (int lv = 0; lv < 256; lv += 50) begin
      level = 8'(lv);
      for (int k = 0; k < 6; k++) begin
        logic bit_now;
        repeat (3) @(negedge clk);
        bit_now = b7;
        ones = 0;
        for (int t = 0; t < 250; t++) begin ones += q7; @(negedge clk); end
        expect_ones = bit_now ? (128 + lv / 2) * 250 / 256 : (128 - lv / 2) * 250 / 256;
        check((ones + 3 >= expect_ones) && (ones <= expect_ones + 3),
              $sformatf("level %0d: %0d ones, expected %0d", lv, ones, expect_ones));
        repeat (3) @(negedge clk);
      end
    end
    // default instance: balanced over many clocks at full level
    level = 8'd255; div = 8'd0;
    ones_d = 0;
    for (int t = 0; t < 20000; t++) begin @(negedge clk); ones_d += bd; end
    check(ones_d > 9000 && ones_d < 11000, $sformatf("23-bit LFSR balance %0d", ones_d));
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
