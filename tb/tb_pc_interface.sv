// tb_pc_interface - self-checking test of the settings register file.
//
// Checks reset values, then writes random values to every setting register
// and checks both the read-back and the settings outputs, checks that a
// write to an unused address changes nothing, and that writes to 0x40-0x7F
// appear on the table write port in the same clock (and only those).
module tb_pc_interface;
  timeunit 1ns; timeprecision 1ps;
  import tmap_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we = 1'b0;
  logic [6:0]  addr = '0;
  logic [15:0] wdata = '0, rdata;
  cfg_t        cfg;
  logic        tab_we;
  logic [5:0]  tab_addr;
  logic [11:0] tab_wdata;

  pc_interface dut (.clk(clk), .rst_n(rst_n), .we(we), .addr(addr), .wdata(wdata),
                    .rdata(rdata), .cfg(cfg), .tab_we(tab_we), .tab_addr(tab_addr),
                    .tab_wdata(tab_wdata));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic wr(logic [6:0] a, logic [15:0] d);
    @(negedge clk);
    we = 1'b1; addr = a; wdata = d;
    #1;
    check(tab_we == (a >= 7'h40), "table write strobe only for 0x40-0x7F");
    if (a >= 7'h40) check(tab_addr == a[5:0] && tab_wdata == d[11:0], "table write address/data");
    @(negedge clk);
    we = 1'b0;
  endtask

  // combinational read: rdata follows addr
  task automatic rdchk(logic [6:0] a, logic [15:0] expected, string what);
    addr = a;
    #1;
    check(rdata == expected, what);
  endtask

  initial begin
    logic [15:0] v [7];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(cfg.lin_en == 1'b1 && cfg.amp == 8'd255 && cfg.noise_level == 8'd0 &&
          cfg.noise_div == 8'd99 && cfg.delay1 == 16'd0 && cfg.delay2 == 16'd5000 &&
          cfg.delay3 == 16'd5000, "reset values");
    for (int r = 0; r < 50; r++) begin
      for (int i = 0; i < 7; i++) begin
        v[i] = 16'($urandom);
        wr(7'(i), v[i]);
      end
      wr(7'h20, 16'hFFFF);                // unused address
      wr(7'(7'h40 + ($urandom % 64)), 16'($urandom));
      check(cfg.lin_en == v[0][0], "lin_en");
      check(cfg.amp == v[1][7:0], "amp");
      check(cfg.noise_level == v[2][7:0], "noise level");
      check(cfg.noise_div == v[3][7:0], "noise div");
      check(cfg.delay1 == v[4] && cfg.delay2 == v[5] && cfg.delay3 == v[6], "delays");
      rdchk(7'h00, {15'd0, v[0][0]}, "read ctrl");
      rdchk(7'h01, {8'd0, v[1][7:0]}, "read amp");
      rdchk(7'h02, {8'd0, v[2][7:0]}, "read level");
      rdchk(7'h03, {8'd0, v[3][7:0]}, "read div");
      rdchk(7'h04, v[4], "read delay1");
      rdchk(7'h05, v[5], "read delay2");
      rdchk(7'h06, v[6], "read delay3");
      rdchk(7'h20, 16'd0, "read unused");
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
