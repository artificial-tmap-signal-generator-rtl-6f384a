// tmap_pkg - constants and types shared by the artificial TMAP generator.
//
// Holds the register map of the PC-side control interface, the settings
// structure that the interface hands to the datapath, and the function that
// fills the waveform table with the transmembrane action potential template
//   Vm(t) = A * t^n * exp(-B t),  t >= 0.
// The template is sampled at t = k*Ts for k = 0..63 and normalised so that its
// peak (at t = n/B) lands on full scale, 2^W - 1; A therefore only sets the
// analog amplitude and drops out of the table. The default B, n and Ts are the
// printed typical values (B = 1.5e4 1/s, n = 1, 100 kS/s). The register
// addresses, widths and reset values are this design's own choice.
package tmap_pkg;

  // Register map (7-bit word address, 16-bit data)
  localparam logic [6:0] REG_CTRL        = 7'h00;  // bit0: linearization enable
  localparam logic [6:0] REG_AMP         = 7'h01;  // 8-bit signal amplitude
  localparam logic [6:0] REG_NOISE_LEVEL = 7'h02;  // 8-bit noise level
  localparam logic [6:0] REG_NOISE_DIV   = 7'h03;  // LFSR shifts every DIV+1 clocks
  localparam logic [6:0] REG_DELAY1      = 7'h04;  // delay of stage 1, clocks
  localparam logic [6:0] REG_DELAY2      = 7'h05;  // delay of stage 2, clocks
  localparam logic [6:0] REG_DELAY3      = 7'h06;  // delay of stage 3, clocks
  localparam logic [6:0] REG_TABLE_BASE  = 7'h40;  // 0x40..0x7F: waveform table

  localparam int unsigned NCH = 3;  // electrode channels

  // Reset values of the settings
  localparam logic [7:0]  RST_AMP         = 8'd255;
  localparam logic [7:0]  RST_NOISE_LEVEL = 8'd0;
  localparam logic [7:0]  RST_NOISE_DIV   = 8'd99;    // 1 MHz shift rate at 100 MHz
  localparam logic [15:0] RST_DELAY1      = 16'd0;
  localparam logic [15:0] RST_DELAY2      = 16'd5000; // 50 us
  localparam logic [15:0] RST_DELAY3      = 16'd5000;

  typedef struct packed {
    logic        lin_en;
    logic [7:0]  amp;
    logic [7:0]  noise_level;
    logic [7:0]  noise_div;
    logic [15:0] delay1;
    logic [15:0] delay2;
    logic [15:0] delay3;
  } cfg_t;

  // Template sample k of Eq. (1), normalised to full scale fs.
  function automatic int unsigned tmap_sample(int k, real b, int n, real ts, int unsigned fs);
    real t, tp, v, vp;
    t  = k * ts;
    tp = n / b;                       // time of the peak
    v  = (t ** n) * $exp(-b * t);
    vp = (tp ** n) * $exp(-b * tp);
    return $rtoi(fs * v / vp + 0.5);
  endfunction

endpackage
