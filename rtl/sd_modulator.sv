// sd_modulator - first-order one-bit sigma-delta modulator (digital DAC).
//
// Structure as specified: an (N+1)-bit "sigma" register integrates the N-bit
// input x plus its own value minus the one-bit DAC feedback, where the DAC
// maps output 0 to 0 and output 1 to Max = 2^N. A comparator turns the sigma
// register into the output bit. This design compares against 2^N - 1 (the
// bit is 1 while sigma >= 2^N), which keeps sigma within 0 .. 2^(N+1)-2.
// Over any long stretch the density of ones equals x / 2^N, and the running
// count of ones never differs from the ideal by more than one. The output bit
// depends on the sigma register alone (it is its top bit), so it changes only
// on clock edges; the bit shown in a clock is the one whose feedback is
// subtracted at the end of that clock. 'en' is a clock enable; reset clears
// sigma.
module sd_modulator #(
  parameter int unsigned N = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [N-1:0] x,
  output logic         q
);

  localparam logic [N:0] MAX = {1'b1, N'(0)};

  logic [N:0] sigma, sigma_next, fb;

  always_comb begin
    q          = (sigma > {1'b0, {N{1'b1}}});   // x > y with y = 2^N - 1
    fb         = q ? MAX : '0;                   // 1-bit DAC: 0 => 0, 1 => Max
    sigma_next = sigma + {1'b0, x} - fb;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  sigma <= '0;
    else if (en) sigma <= sigma_next;
  end

endmodule
