// tb_tmap_generator_top - end-to-end test of the three-channel generator.
//
// Runs the top at its default parameters (99.0 kHz sample rate, 12-bit
// modulator, 1024-bit scrambler frames, 64K-bit delay lines) through four
// phases, each at least one full 64-sample spike long:
//   A  reset settings: linearization on, full amplitude, delays 0/5000/5000
//   B  linearization off (stepped reference)
//   C  linearization on, amplitude 127, delays 300/1234/777, noise level 255
//   D  a triangular waveform written into the table over the register bus
// Checks, all against models kept by the testbench:
//   - sample_addr / sample_tick follow the 1010-clock sample period;
//   - every scrambler frame of channel 1 holds as many ones as the ideal
//     reference over the matching 1024 clocks divided by 4096 (within 4):
//     the reference is the template formula (or the loaded triangle), ramped
//     linearly between samples (or held, phase B) and scaled by (amp+1)/256.
//     The pipeline offsets used are those stated in the modules' headers;
//   - channel 2 equals channel 1 delayed by 1+delay2 clocks, channel 3 equals
//     channel 2 delayed by 1+delay3 clocks, bit for bit;
//   - register read-back; noise outputs balanced, 50 % exactly-ish at level
//     0, and mutually uncorrelated at level 255.
// Every mechanism (counter wrap, linearization on and off, amplitude change,
// delay change, table reload, noise level change, scrambled frames) is
// counted, and one that never happened is a failure.
module tb_tmap_generator_top;
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
  localparam int PH    = SPIKE + 6 * FRAME;      // clocks per phase
  localparam int TOTAL = 4 * PH;

  // Model state per phase
  real tab_model [64];
  int  m_lin, m_amp, m_d1, m_d2, m_d3;
  // first sample period that uses the current settings: the linearizer
  // latches its slope and lin_en at each sample tick
  int  phase_start;

  // Recorded outputs, indexed by cycle
  logic out0 [TOTAL];
  logic out1 [TOTAL];
  logic out2 [TOTAL];

  // Mechanism counters
  int n_wrap = 0, n_lin_on = 0, n_lin_off = 0, n_amp = 0, n_delay = 0;
  int n_reload = 0, n_noise = 0, n_frames = 0, n_dly_bits = 0;

  int cyc = 0;

  // Ideal reference (before amplitude) at pipeline time index i
  function automatic real ref_at(int i);
    int k, j;
    real c, n;
    if (i < 0) return 0.0;
    k = (i / DIV) % 64;
    j = i % DIV;
    c = tab_model[k];
    n = tab_model[(k + 1) % 64];
    return m_lin ? c + (n - c) * j / DIV : c;
  endfunction

  // Bus write at a negedge; the setting is in effect from the next edge
  task automatic bus_write(logic [6:0] a, logic [15:0] d);
    bus_we = 1'b1; bus_addr = a; bus_wdata = d;
    @(negedge clk); cyc++;
    bus_we = 1'b0;
  endtask

  task automatic bus_check(logic [6:0] a, logic [15:0] d);
    bus_addr = a; #1;
    check(bus_rdata == d, $sformatf("read back 0x%0h", a));
  endtask

  // One clock of recording and the per-cycle checks
  task automatic step();
    out0[cyc] = tmap_out[0];
    out1[cyc] = tmap_out[1];
    out2[cyc] = tmap_out[2];
    check(sample_addr == 6'((cyc / DIV) % 64), "sample address");
    check(sample_tick == ((cyc % DIV) == 0), "sample tick");
    if (cyc > 0 && (cyc % SPIKE) == 0) n_wrap++;
    // delay relations (skip clocks whose history predates the settings)
    if (cyc - 1 - m_d2 >= phase_start + 4)
      begin check(out1[cyc] == out0[cyc - 1 - m_d2], "channel 2 = channel 1 delayed"); n_dly_bits++; end
    if (cyc - 1 - m_d3 >= phase_start + 4)
      check(out2[cyc] == out1[cyc - 1 - m_d3], "channel 3 = channel 2 delayed");
    // frame check: output frame f of channel 1 ends at cycle 1024f+1025+d1
    if (((cyc - 1025 - m_d1) % FRAME) == 0 && cyc >= 1025 + m_d1) begin
      int f, ones, lo;
      real ideal;
      f  = (cyc - 1025 - m_d1) / FRAME;
      lo = FRAME * (f - 1) - 3;             // first reference index of the frame
      if (f >= 1 && lo >= phase_start + 2) begin
        ones = 0;
        for (int c = cyc - FRAME + 1; c <= cyc; c++) ones += out0[c];
        ideal = 0.0;
        for (int i = lo; i < lo + FRAME; i++) ideal += ref_at(i) * (m_amp + 1) / 256.0;
        ideal = ideal / 4096.0;
        check((real'(ones) - ideal) <= 4.0 && (ideal - real'(ones)) <= 4.0,
              $sformatf("frame %0d ones %0d ideal %f", f, ones, ideal));
        n_frames++;
        if (m_lin) n_lin_on++; else n_lin_off++;
      end
    end
    @(negedge clk); cyc++;
  endtask

  initial begin
    int ones_n [3];
    int agree01, agree12, ncount;
    real x;
    for (int k = 0; k < 64; k++) begin
      x = 1.5e4 * k * 1.0e-5;
      tab_model[k] = real'($rtoi(4095.0 * x * $exp(1.0 - x) + 0.5));
    end
    m_lin = 1; m_amp = 255; m_d1 = 0; m_d2 = 5000; m_d3 = 5000; phase_start = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    cyc = 0;

    // Phase A: reset settings; noise level 0
    bus_check(REG_CTRL, 16'd1);
    bus_check(REG_DELAY2, 16'd5000);
    ones_n = '{0, 0, 0};
    while (cyc < PH) begin
      for (int ch = 0; ch < 3; ch++) ones_n[ch] += noise_out[ch];
      step();
    end
    for (int ch = 0; ch < 3; ch++)
      check(ones_n[ch] > PH / 2 - PH / 500 && ones_n[ch] < PH / 2 + PH / 500,
            $sformatf("noise ch%0d silent (50 %%) at level 0: %0d", ch, ones_n[ch]));

    // Phase B: linearization off
    bus_write(REG_CTRL, 16'd0);
    m_lin = 0; phase_start = ((cyc / DIV) + 1) * DIV;
    while (cyc < 2 * PH) step();

    // Phase C: linearization on, half amplitude, new delays, full noise
    bus_write(REG_CTRL, 16'd1);
    bus_write(REG_AMP, 16'd127);
    bus_write(REG_DELAY1, 16'd300);
    bus_write(REG_DELAY2, 16'd1234);
    bus_write(REG_DELAY3, 16'd777);
    bus_write(REG_NOISE_LEVEL, 16'd255);
    m_lin = 1; m_amp = 127; m_d1 = 300; m_d2 = 1234; m_d3 = 777; phase_start = ((cyc / DIV) + 1) * DIV;
    n_amp++; n_delay++; n_noise++;
    bus_check(REG_AMP, 16'd127);
    bus_check(REG_DELAY3, 16'd777);
    ones_n = '{0, 0, 0}; agree01 = 0; agree12 = 0; ncount = 0;
    while (cyc < 3 * PH) begin
      for (int ch = 0; ch < 3; ch++) ones_n[ch] += noise_out[ch];
      agree01 += (noise_out[0] == noise_out[1]);
      agree12 += (noise_out[1] == noise_out[2]);
      ncount++;
      step();
    end
    for (int ch = 0; ch < 3; ch++)
      check(ones_n[ch] > ncount * 42 / 100 && ones_n[ch] < ncount * 58 / 100,
            $sformatf("noise ch%0d balanced: %0d of %0d", ch, ones_n[ch], ncount));
    check(agree01 > ncount * 42 / 100 && agree01 < ncount * 58 / 100, "noise ch1/ch2 uncorrelated");
    check(agree12 > ncount * 42 / 100 && agree12 < ncount * 58 / 100, "noise ch2/ch3 uncorrelated");

    // Phase D: load a triangular waveform over the bus
    for (int k = 0; k < 64; k++) begin
      automatic int v = (k < 32) ? k * 128 : (63 - k) * 128;
      bus_write(7'(REG_TABLE_BASE + k), 16'(v));
      tab_model[k] = real'(v);
    end
    bus_write(REG_AMP, 16'd255);
    m_amp = 255; phase_start = ((cyc / DIV) + 1) * DIV; n_reload++; n_amp++;
    while (cyc < TOTAL) step();

    check(n_wrap >= 3, "spike repeated (counter wrap)");
    check(n_lin_on > 100, "frames checked with linearization");
    check(n_lin_off > 50, "frames checked without linearization");
    check(n_amp >= 2 && n_delay >= 1 && n_reload >= 1 && n_noise >= 1, "setting changes");
    check(n_frames > 200, "scrambled frames checked");
    check(n_dly_bits > 100000, "delayed bits compared");
    $display("mechanisms: wraps=%0d frames=%0d (lin on %0d, off %0d) amp=%0d delay=%0d reload=%0d noise=%0d",
             n_wrap, n_frames, n_lin_on, n_lin_off, n_amp, n_delay, n_reload, n_noise);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (TOTAL + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
