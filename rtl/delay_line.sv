// delay_line - programmable delay of a one-bit stream.
//
// A circular buffer of 2^AW bits is written with 'din' every clock at a
// running write pointer; the output reads the bit written 'delay' clocks
// earlier. The delay is set in whole clocks (10 ns at 100 MHz), so the shift
// between electrode channels can be matched to any propagation velocity and
// need not be a multiple of the sample period. 'dout' is registered:
// dout(t) = din(t - 1 - delay), for delay = 0 .. 2^AW - 1. Until 'delay' bits
// have been written after reset the output is 0 (a fill counter masks the
// unwritten buffer). The buffer depth is this design's choice.
module delay_line #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          din,
  input  logic [AW-1:0] delay,
  output logic          dout
);

  logic          mem [2 ** AW];
  logic [AW-1:0] wp;
  logic [AW:0]   filled;     // saturating count of bits written since reset
  logic [AW-1:0] rp;
  logic          rbit;

  always_comb begin
    rp   = wp - delay;
    rbit = (delay == '0) ? din : mem[rp];
  end

  always_ff @(posedge clk) mem[wp] <= din;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp     <= '0;
      filled <= '0;
      dout   <= 1'b0;
    end else begin
      wp   <= wp + 1'b1;
      if (!filled[AW]) filled <= filled + 1'b1;
      dout <= (filled >= {1'b0, delay}) ? rbit : 1'b0;
    end
  end

endmodule
