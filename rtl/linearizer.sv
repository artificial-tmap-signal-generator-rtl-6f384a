// linearizer - straight-line interpolation of the modulator reference.
//
// Without it the modulator input is held at sample k for a whole sample
// period, and the RC smoothing filter charges towards each new level in a
// visible curve. Here the reference instead ramps linearly from sample k
// ('cur') towards sample k+1 ('nxt') during the period, which keeps the
// voltage across the filter's input resistor constant and gives straight
// segments between the sample points. The ramp is an accumulator: at 'tick'
// it is loaded with cur * 2^FRAC and the per-clock slope
// (nxt - cur) * floor(2^FRAC / SAMPLE_DIV) is latched; every other clock the
// slope is added. Rounding the reciprocal down keeps the ramp from
// overshooting nxt. The ramp method itself is this design's choice; the
// straight-line goal is the specification's. With lin_en low the output holds
// 'cur' (plain stepped reference). lin_en, cur and nxt are sampled at 'tick'
// only, so a new setting or table entry takes effect from the next sample
// period. The output 'y' is registered: it shows 'cur' in the clock after
// 'tick' and then one slope step per clock.
module linearizer #(
  parameter int unsigned W          = 12,
  parameter int unsigned SAMPLE_DIV = 1010,
  parameter int unsigned FRAC       = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic [W-1:0] cur,
  input  logic [W-1:0] nxt,
  input  logic         lin_en,
  output logic [W-1:0] y
);

  localparam int unsigned RECIP = (2 ** FRAC) / SAMPLE_DIV;   // floor
  localparam int unsigned RW    = $clog2(RECIP + 1) + 1;      // signed width
  localparam int unsigned SW    = W + 1 + RW;                 // slope width
  localparam int unsigned AW    = W + FRAC + 1;               // accumulator

  logic signed [W:0]    diff;
  logic signed [SW-1:0] slope_d, slope_q;
  logic signed [AW-1:0] acc;

  always_comb begin
    diff    = $signed({1'b0, nxt}) - $signed({1'b0, cur});
    slope_d = SW'(diff) * $signed(SW'(RECIP));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc     <= '0;
      slope_q <= '0;
    end else if (tick) begin
      acc     <= $signed({1'b0, cur, FRAC'(0)});
      slope_q <= lin_en ? slope_d : '0;
    end else begin
      acc     <= acc + AW'(slope_q);
    end
  end

  assign y = acc[FRAC +: W];

endmodule
