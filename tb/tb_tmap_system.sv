// tb_tmap_system - end-to-end test of the generator with its analog stages.
//
// Runs the board-level model at default parameters. Phase 1 (noise level 0)
// lasts seven spike periods (the filter's time constant is 470 us); the
// last is measured. Phase 2 sets the noise
// level to 255 and measures a further period. Checks:
//   - the filtered channel-2 voltage equals the channel-1 voltage 5001 clocks
//     earlier (1 + reset delay2), channel 3 the channel-2 one 5001 earlier;
//   - over one spike period the mean of v_tmap1 equals -0.1 * 3.3 V times the
//     mean duty that the template formula predicts (within 2 %);
//   - the spike shows as a negative excursion of more than 20 mV;
//   - the noise voltage is below 2 mV rms at level 0 and over three times
//     that, but below 40 mV, at level 255; v_chN is the sum of both.
// Counts the spikes and noise settings seen; a missing one is a failure.
module tb_tmap_system;
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
  real v_t1, v_t2, v_t3, v_n1, v_n2, v_n3, v_c1, v_c2, v_c3;

  tmap_system dut (
    .clk(clk), .rst_n(rst_n), .bus_we(bus_we), .bus_addr(bus_addr),
    .bus_wdata(bus_wdata), .bus_rdata(bus_rdata), .tmap_out(tmap_out),
    .noise_out(noise_out), .sample_addr(sample_addr), .sample_tick(sample_tick),
    .v_tmap1(v_t1), .v_tmap2(v_t2), .v_tmap3(v_t3),
    .v_noise1(v_n1), .v_noise2(v_n2), .v_noise3(v_n3),
    .v_ch1(v_c1), .v_ch2(v_c2), .v_ch3(v_c3));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  localparam int DIV   = 1010;
  localparam int SPIKE = 64 * DIV;
  localparam int TOTAL = 8 * SPIKE + 100;
  localparam int LAG   = 5001;

  real h1 [TOTAL];
  real h2 [TOTAL];
  int  cyc = 0, n_spikes = 0, n_levels = 0;

  real mean_duty_ideal;

  task automatic measure(output real mean_t, output real min_t, output real rms_n,
                         input bit level_check);
    real sum_t, sumsq;
    sum_t = 0.0; sumsq = 0.0; min_t = 1.0e9;
    for (int i = 0; i < SPIKE; i++) begin
      h1[cyc] = v_t1; h2[cyc] = v_t2;
      if (cyc >= LAG) begin
        check((v_t2 - h1[cyc - LAG]) < 1.0e-9 && (h1[cyc - LAG] - v_t2) < 1.0e-9,
              "channel 2 voltage = channel 1 delayed");
        check((v_t3 - h2[cyc - LAG]) < 1.0e-9 && (h2[cyc - LAG] - v_t3) < 1.0e-9,
              "channel 3 voltage = channel 2 delayed");
      end
      if (level_check) begin
        check((v_c1 - (v_t1 + v_n1)) < 1.0e-12 && ((v_t1 + v_n1) - v_c1) < 1.0e-12, "channel sum");
      end
      sum_t += v_t1;
      if (v_t1 < min_t) min_t = v_t1;
      sumsq += v_n1 * v_n1;
      if (cyc > 0 && (cyc % SPIKE) == 0) n_spikes++;
      @(negedge clk); cyc++;
    end
    mean_t = sum_t / SPIKE;
    rms_n  = $sqrt(sumsq / SPIKE);
  endtask

  initial begin
    real mean_t, min_t, rms0, rms255, x, s, c, n, expect_mean;
    real tab [64];
    // mean duty of one spike period from the template, ramped between samples
    for (int k = 0; k < 64; k++) begin
      x = 1.5e4 * k * 1.0e-5;
      tab[k] = real'($rtoi(4095.0 * x * $exp(1.0 - x) + 0.5));
    end
    s = 0.0;
    for (int k = 0; k < 64; k++) begin
      c = tab[k]; n = tab[(k + 1) % 64];
      s += (c + n) / 2.0;
    end
    mean_duty_ideal = s / 64.0 / 4096.0;
    expect_mean = -0.1 * 3.3 * mean_duty_ideal;

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Phase 1: six periods to settle, one measured
    for (int p = 0; p < 6; p++) measure(mean_t, min_t, rms0, 1'b0);
    measure(mean_t, min_t, rms0, 1'b1);
    n_levels++;
    check((mean_t - expect_mean) < 0.02 * (-expect_mean) &&
          (expect_mean - mean_t) < 0.02 * (-expect_mean),
          $sformatf("mean TMAP voltage %f vs %f", mean_t, expect_mean));
    check(mean_t - min_t > 0.020, $sformatf("spike excursion %f V", mean_t - min_t));
    check(rms0 < 0.002, $sformatf("noise rms at level 0: %f", rms0));
    $display("mean %f V (expected %f), excursion %f V, noise rms level 0: %f V",
             mean_t, expect_mean, mean_t - min_t, rms0);
    // Phase 2: full noise
    bus_we = 1'b1; bus_addr = REG_NOISE_LEVEL; bus_wdata = 16'd255;
    h1[cyc] = v_t1; h2[cyc] = v_t2;
    @(negedge clk); cyc++;
    bus_we = 1'b0;
    n_levels++;
    measure(mean_t, min_t, rms255, 1'b1);
    $display("noise rms level 255: %f V", rms255);
    check(rms255 > 3.0 * rms0 && rms255 > 0.002 && rms255 < 0.040,
          $sformatf("noise rms at level 255: %f", rms255));
    check(n_spikes >= 7, "spikes seen");
    check(n_levels == 2, "noise levels seen");
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
