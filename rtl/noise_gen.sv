// noise_gen - one channel of adjustable white noise.
//
// A LEN-bit Fibonacci linear feedback shift register with a single XOR
// (feedback = bit LEN xor bit TAP, both counted from 1) produces a pseudo-random
// bit. It shifts once every div+1 clocks (programmable clock divider), which
// sets the noise bandwidth. The random bit chooses between mid-scale plus or
// minus half the 8-bit noise level, and an 8-bit first-order sigma-delta turns
// that value into the one-bit output 'q'. After the off-chip level shifter
// (1 => +VDD, 0 => -VDD) and the low-pass filter, q is zero-mean noise whose
// amplitude is proportional to 'level': level 0 gives silence (a 50 % stream),
// level 255 nearly the raw LFSR bit. The LFSR, the single XOR and the divider
// follow the specification; the taps, seed and the way the level acts are
// this design's choice. Each of the three channels uses a different length and
// tap set so the channels are uncorrelated. 'lfsr_bit' is the register's last
// stage.
module noise_gen #(
  parameter int unsigned LEN  = 23,
  parameter int unsigned TAP  = 18,
  parameter logic [LEN-1:0] SEED = LEN'(1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] div,
  input  logic [7:0] level,
  output logic       q,
  output logic       lfsr_bit
);

  logic [LEN-1:0] sr;
  logic [7:0]     dcnt;
  logic [7:0]     half, nval;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr   <= (SEED == '0) ? LEN'(1) : SEED;   // all-zero state would lock up
      dcnt <= '0;
    end else if (dcnt >= div) begin
      dcnt <= '0;
      sr   <= {sr[LEN-2:0], sr[LEN-1] ^ sr[TAP-1]};
    end else begin
      dcnt <= dcnt + 1'b1;
    end
  end

  assign lfsr_bit = sr[LEN-1];

  always_comb begin
    half = {1'b0, level[7:1]};
    nval = lfsr_bit ? (8'd128 + half) : (8'd128 - half);
  end

  sd_modulator #(.N(8)) u_level_sd (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .x(nval), .q(q)
  );

endmodule
