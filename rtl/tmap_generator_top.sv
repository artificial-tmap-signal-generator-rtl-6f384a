// tmap_generator_top - three-channel artificial TMAP generator with noise.
//
// Produces, from one 100 MHz clock, three one-bit streams that an off-chip
// active RC low-pass filter turns into three copies of a transmembrane action
// potential (TMAP), each shifted in time against the previous one as if the
// spike were travelling past the three electrodes of a nerve cuff; plus three
// uncorrelated one-bit noise streams to be added to them.
//
// Datapath, in the order the signal flows:
//   sample_counter  steps a 6-bit address through the 64-sample template at
//                   100 MHz / SAMPLE_DIV (99.0 kHz);
//   tmap_table      64 x 12-bit waveform memory (template of Eq. (1), or a
//                   pattern loaded from the PC);
//   linearizer      ramps the reference from sample k to sample k+1;
//   amp_scale       applies the 8-bit amplitude setting;
//   sd_modulator    first-order one-bit sigma-delta (12-bit input);
//   scrambler       bit-reversal re-ordering in 1024-bit frames;
//   delay_line x3   chained programmable delays; channel k is the output of
//                   stage k, so channel 3 lags channel 1 by delay2 + delay3;
//   noise_gen x3    LFSR noise per channel with common level and divider;
//   pc_interface    register file written by the PC link.
// The single modulator feeding a chain of delays, the noise channels and the
// three user settings follow the specification; the control bus, register map
// and all widths not stated there are this design's own.
//
// Interface: a plain register bus (bus_we, bus_addr, bus_wdata, bus_rdata,
// combinational read) stands where the USB link would connect. tmap_out[k] and
// noise_out[k] are registered outputs for channel k+1. sample_addr and
// sample_tick show the template position. Latency from the table to
// tmap_out[0], in clocks: 1 (linearizer) + 1 (amp_scale) + 1 (modulator) +
// 2..2048 (scrambler, 1025 on average) + 1 + delay1. Each 1024-clock frame
// of tmap_out[0] holds exactly the ones of one modulator frame.
module tmap_generator_top
  import tmap_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV = 1010,
  parameter int unsigned N          = 12,
  parameter int unsigned FRAME_BITS = 10,
  parameter int unsigned DELAY_AW   = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            bus_we,
  input  logic [6:0]      bus_addr,
  input  logic [15:0]     bus_wdata,
  output logic [15:0]     bus_rdata,
  output logic [NCH-1:0]  tmap_out,
  output logic [NCH-1:0]  noise_out,
  output logic [5:0]      sample_addr,
  output logic            sample_tick
);

  cfg_t        cfg;
  logic        tab_we;
  logic [5:0]  tab_addr;
  logic [11:0] tab_wdata;

  pc_interface u_pc (
    .clk(clk), .rst_n(rst_n), .we(bus_we), .addr(bus_addr), .wdata(bus_wdata),
    .rdata(bus_rdata), .cfg(cfg), .tab_we(tab_we), .tab_addr(tab_addr),
    .tab_wdata(tab_wdata)
  );

  logic [5:0] addr, addr_next;
  logic       tick;

  sample_counter #(.SAMPLE_DIV(SAMPLE_DIV), .AW(6)) u_cnt (
    .clk(clk), .rst_n(rst_n), .addr(addr), .addr_next(addr_next), .tick(tick),
    .phase()
  );

  logic [N-1:0] cur, nxt, ref_lin, ref_amp;

  tmap_table #(.DEPTH(64), .W(N)) u_table (
    .clk(clk), .we(tab_we), .waddr(tab_addr), .wdata(N'(tab_wdata)),
    .raddr0(addr), .rdata0(cur), .raddr1(addr_next), .rdata1(nxt)
  );

  linearizer #(.W(N), .SAMPLE_DIV(SAMPLE_DIV)) u_lin (
    .clk(clk), .rst_n(rst_n), .tick(tick), .cur(cur), .nxt(nxt),
    .lin_en(cfg.lin_en), .y(ref_lin)
  );

  amp_scale #(.W(N), .AMPW(8)) u_amp (
    .clk(clk), .rst_n(rst_n), .x(ref_lin), .amp(cfg.amp), .y(ref_amp)
  );

  logic sd_bit, scr_bit;

  sd_modulator #(.N(N)) u_sd (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .x(ref_amp), .q(sd_bit)
  );

  scrambler #(.F(FRAME_BITS)) u_scr (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .din(sd_bit), .dout(scr_bit),
    .valid()
  );

  logic [DELAY_AW-1:0] dly [NCH];
  assign dly[0] = DELAY_AW'(cfg.delay1);
  assign dly[1] = DELAY_AW'(cfg.delay2);
  assign dly[2] = DELAY_AW'(cfg.delay3);

  logic [NCH:0] chain;
  assign chain[0] = scr_bit;

  for (genvar c = 0; c < NCH; c++) begin : g_delay
    delay_line #(.AW(DELAY_AW)) u_dl (
      .clk(clk), .rst_n(rst_n), .din(chain[c]), .delay(dly[c]),
      .dout(chain[c+1])
    );
  end

  assign tmap_out = chain[NCH:1];

  // Three maximal-length one-XOR LFSRs of different lengths and seeds
  noise_gen #(.LEN(23), .TAP(18), .SEED(23'h1)) u_noise0 (
    .clk(clk), .rst_n(rst_n), .div(cfg.noise_div), .level(cfg.noise_level),
    .q(noise_out[0]), .lfsr_bit()
  );
  noise_gen #(.LEN(25), .TAP(22), .SEED(25'h15A5A5A)) u_noise1 (
    .clk(clk), .rst_n(rst_n), .div(cfg.noise_div), .level(cfg.noise_level),
    .q(noise_out[1]), .lfsr_bit()
  );
  noise_gen #(.LEN(31), .TAP(28), .SEED(31'h2B3C4D5E)) u_noise2 (
    .clk(clk), .rst_n(rst_n), .div(cfg.noise_div), .level(cfg.noise_level),
    .q(noise_out[2]), .lfsr_bit()
  );

  assign sample_addr = addr;
  assign sample_tick = tick;

endmodule
