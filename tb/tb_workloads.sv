// tb_workloads - the generator under its two evaluation workloads.
//
// 1. Sinusoidal test wave: a 64-sample sine (mid-scale 2048, amplitude 2000)
//    is loaded into the waveform table over the register bus and played with
//    and without linearization. Every 1024-clock scrambler frame of channel 1
//    must hold as many ones as the ideal reference (ramped or stepped sine)
//    over the matching clocks, within 4.
// 2. Conduction-velocity sweep: for an electrode pitch of 5 mm (an example
//    value) the velocities 10, 20, 50, 100 and 120 m/s are turned into stage
//    delays (pitch / v in 10 ns clocks, minus the one clock of the output
//    register) and written to delay2 and delay3. After the buffers refill,
//    channel 2 must equal channel 1 shifted by exactly pitch / v, and channel
//    3 channel 2 by the same, bit for bit.
// All parameters of the generator are at their defaults.
module tb_workloads;
  timeunit 1ns; timeprecision 1ps;
  import tmap_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        bus_we = 1'b0;
  logic [6:0]  bus_addr = '0;
  logic [15:0] bus_wdata = '0, bus_rdata;
  logic [2:0]  tmap_out, noise_out;
  logic [5:0]  sample_addr;
  logic        sample_tick;

  tmap_generator_top dut (
    .clk(clk), .rst_n(rst_n), .bus_we(bus_we), .bus_addr(bus_addr),
    .bus_wdata(bus_wdata), .bus_rdata(bus_rdata), .tmap_out(tmap_out),
    .noise_out(noise_out), .sample_addr(sample_addr), .sample_tick(sample_tick));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  localparam int DIV   = 1010;
  localparam int FRAME = 1024;
  localparam int SPIKE = 64 * DIV;
  localparam int MAXC  = 900000;

  real tab_model [64];
  int  m_lin = 1, m_d1 = 0, m_d2 = 5000, m_d3 = 5000;
  int  frame_from = 1 << 30;       // first reference index the frame check may use
  int  dly_from = 1 << 30;         // first cycle the delay check may use
  int  cyc = 0, n_frames = 0, n_dly = 0;
  logic out0 [MAXC];
  logic out1 [MAXC];

  function automatic real ref_at(int i);
    int k, j;
    real c, n;
    k = (i / DIV) % 64;
    j = i % DIV;
    c = tab_model[k];
    n = tab_model[(k + 1) % 64];
    return m_lin ? c + (n - c) * j / DIV : c;
  endfunction

  task automatic step();
    out0[cyc] = tmap_out[0];
    out1[cyc] = tmap_out[1];
    if (cyc >= dly_from) begin
      check(tmap_out[1] == out0[cyc - 1 - m_d2], "channel 2 lag");
      check(tmap_out[2] == out1[cyc - 1 - m_d3], "channel 3 lag");
      n_dly++;
    end
    if (cyc >= 1025 + m_d1 && ((cyc - 1025 - m_d1) % FRAME) == 0) begin
      int f, ones, lo;
      real ideal;
      f  = (cyc - 1025 - m_d1) / FRAME;
      lo = FRAME * (f - 1) - 3;
      if (lo >= frame_from) begin
        ones = 0;
        for (int c = cyc - FRAME + 1; c <= cyc; c++) ones += out0[c];
        ideal = 0.0;
        for (int i = lo; i < lo + FRAME; i++) ideal += ref_at(i);
        ideal = ideal / 4096.0;
        check((real'(ones) - ideal) <= 4.0 && (ideal - real'(ones)) <= 4.0,
              $sformatf("sine frame %0d ones %0d ideal %f", f, ones, ideal));
        n_frames++;
      end
    end
    @(negedge clk); cyc++;
  endtask

  task automatic bus_write(logic [6:0] a, logic [15:0] d);
    bus_we = 1'b1; bus_addr = a; bus_wdata = d;
    step();
    bus_we = 1'b0;
  endtask

  initial begin
    int vel [5] = '{10, 20, 50, 100, 120};
    int d, sine_frames;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // 1. sine wave
    for (int k = 0; k < 64; k++) begin
      automatic int v = $rtoi(2048.0 + 2000.0 * $sin(2.0 * 3.14159265358979 * k / 64.0) + 0.5);
      bus_write(7'(REG_TABLE_BASE + k), 16'(v));
      tab_model[k] = real'(v);
    end
    frame_from = ((cyc / DIV) + 1) * DIV;
    while (cyc < frame_from + SPIKE + 4 * FRAME) step();
    bus_write(REG_CTRL, 16'd0);
    m_lin = 0;
    frame_from = ((cyc / DIV) + 1) * DIV;
    while (cyc < frame_from + SPIKE + 4 * FRAME) step();
    sine_frames = n_frames;
    check(sine_frames > 120, "sine frames checked");
    frame_from = 1 << 30;
    // 2. velocity sweep, pitch 5 mm: lag = 5e-3 / v seconds = 5e5 / v clocks
    foreach (vel[i]) begin
      d = 500000 / vel[i] - 1;
      dly_from = 1 << 30;
      bus_write(REG_DELAY2, 16'(d));
      bus_write(REG_DELAY3, 16'(d));
      m_d2 = d; m_d3 = d;
      check(1 + d == 500000 / vel[i], $sformatf("%0d m/s lag %0d clocks", vel[i], 1 + d));
      dly_from = cyc + 2 * d + 8;            // both stages refilled
      while (cyc < dly_from + 3000) step();
    end
    check(n_dly >= 5 * 3000, "lagged bits compared");
    $display("workloads: %0d sine frames, %0d lagged bits over %0d velocities", sine_frames, n_dly, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAXC - 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
