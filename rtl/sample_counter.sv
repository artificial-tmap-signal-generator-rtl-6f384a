// sample_counter - sample-rate timebase and 6-bit template address counter.
//
// A divider counts SAMPLE_DIV clocks per sample period; at the end of each
// period the address steps to the next of the 2^AW template samples and wraps
// from the last back to 0, so the spike repeats every 2^AW sample periods.
// With the 100 MHz reference and SAMPLE_DIV = 1010 the sample rate is 99.0 kHz,
// the rate the design is specified for; the exact divider is this design's
// choice. 'tick' is high in the first clock of every sample period (the clock
// in which 'addr' shows the new value), 'phase' counts the clocks since then
// and 'addr_next' is the sample that follows 'addr'. Reset starts at sample 0
// with a tick.
module sample_counter #(
  parameter int unsigned SAMPLE_DIV = 1010,
  parameter int unsigned AW         = 6,
  localparam int unsigned PW        = $clog2(SAMPLE_DIV)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [AW-1:0] addr,
  output logic [AW-1:0] addr_next,
  output logic          tick,
  output logic [PW-1:0] phase
);

  localparam logic [PW-1:0] LAST = PW'(SAMPLE_DIV - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      addr  <= '0;
      tick  <= 1'b1;
    end else if (phase == LAST) begin
      phase <= '0;
      addr  <= addr + 1'b1;
      tick  <= 1'b1;
    end else begin
      phase <= phase + 1'b1;
      tick  <= 1'b0;
    end
  end

  assign addr_next = addr + 1'b1;

endmodule
