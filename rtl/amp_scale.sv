// amp_scale - signal amplitude setting.
//
// Multiplies the W-bit reference by (amp + 1) / 2^AMPW, so amp = 2^AMPW - 1 is
// unity gain and smaller settings lower the spike amplitude proportionally,
// without reloading the waveform table. One register stage: y follows x and
// amp one clock later. The width of the setting and the scaling law are this
// design's choice; the specification only lists amplitude among the user
// settings.
module amp_scale #(
  parameter int unsigned W    = 12,
  parameter int unsigned AMPW = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [W-1:0]    x,
  input  logic [AMPW-1:0] amp,
  output logic [W-1:0]    y
);

  logic [W+AMPW-1:0] prod;
  logic [AMPW:0]     gain;

  always_comb begin
    gain = {1'b0, amp} + 1'b1;
    prod = (W+AMPW)'(x) * (W+AMPW)'(gain);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) y <= '0;
    else        y <= prod[AMPW +: W];
  end

endmodule
