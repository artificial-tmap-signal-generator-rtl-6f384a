// tmap_system - board-level model: FPGA logic plus the analog output stages.
//
// Wraps the synthesizable generator (tmap_generator_top) with the parts that
// sit between the FPGA pins and the electrode inputs of the amplifier under
// test. Each TMAP bitstream drives a 0 / 3.3 V pin model into its own active
// low-pass filter; each noise bitstream goes through a +/-3.3 V level shifter
// and a filter of the same kind; the two filtered voltages of a channel are
// added into the channel's electrode voltage v_chN (an ideal summing node:
// the specification says the TMAP and noise are combined in the analog domain
// but not how). Contains behavioural analog models, so only the digital
// generator inside is synthesizable. Ports: the generator's clock, reset and
// register bus, its digital outputs, and per channel the filtered TMAP
// voltage, the filtered noise voltage and their sum, in volts (the filter is
// inverting, so a spike is a negative excursion of about -0.33 V * duty).
module tmap_system
  import tmap_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_we,
  input  logic [6:0]  bus_addr,
  input  logic [15:0] bus_wdata,
  output logic [15:0] bus_rdata,
  output logic [2:0]  tmap_out,
  output logic [2:0]  noise_out,
  output logic [5:0]  sample_addr,
  output logic        sample_tick,
  output real         v_tmap1, v_tmap2, v_tmap3,
  output real         v_noise1, v_noise2, v_noise3,
  output real         v_ch1, v_ch2, v_ch3
);

  tmap_generator_top u_fpga (
    .clk(clk), .rst_n(rst_n), .bus_we(bus_we), .bus_addr(bus_addr),
    .bus_wdata(bus_wdata), .bus_rdata(bus_rdata), .tmap_out(tmap_out),
    .noise_out(noise_out), .sample_addr(sample_addr), .sample_tick(sample_tick)
  );

  real vp1, vp2, vp3, vn1, vn2, vn3;

  // TMAP pins: 0 / 3.3 V
  level_shifter #(.VHIGH(3.3), .VLOW(0.0)) u_pin1 (.din(tmap_out[0]), .vout(vp1));
  level_shifter #(.VHIGH(3.3), .VLOW(0.0)) u_pin2 (.din(tmap_out[1]), .vout(vp2));
  level_shifter #(.VHIGH(3.3), .VLOW(0.0)) u_pin3 (.din(tmap_out[2]), .vout(vp3));
  // Noise: +/-VDD level shifters
  level_shifter u_ls1 (.din(noise_out[0]), .vout(vn1));
  level_shifter u_ls2 (.din(noise_out[1]), .vout(vn2));
  level_shifter u_ls3 (.din(noise_out[2]), .vout(vn3));

  active_lpf u_lpf_t1 (.vin(vp1), .vout(v_tmap1));
  active_lpf u_lpf_t2 (.vin(vp2), .vout(v_tmap2));
  active_lpf u_lpf_t3 (.vin(vp3), .vout(v_tmap3));
  active_lpf u_lpf_n1 (.vin(vn1), .vout(v_noise1));
  active_lpf u_lpf_n2 (.vin(vn2), .vout(v_noise2));
  active_lpf u_lpf_n3 (.vin(vn3), .vout(v_noise3));

  assign v_ch1 = v_tmap1 + v_noise1;
  assign v_ch2 = v_tmap2 + v_noise2;
  assign v_ch3 = v_tmap3 + v_noise3;

endmodule
