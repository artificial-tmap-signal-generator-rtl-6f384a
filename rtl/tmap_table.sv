// tmap_table - 64 x 12-bit waveform memory for the TMAP template.
//
// At power-up the table holds Eq. (1), Vm(t) = A t^n exp(-B t), sampled at
// t = k*TS and scaled so that the peak equals 2^W - 1 (see tmap_pkg). The
// default TMAP_B, TMAP_N and TS are the typical values the design was
// specified with; they can be changed per instance. A synchronous write port
// lets the PC load another pattern at run time (the specification only speaks
// of a ROM filled offline; the write port is this design's way of letting the
// user change the pattern over USB). Two asynchronous read ports return the
// current sample and the next one, the latter for the linearizer. The
// power-up contents are given as the memory's initial value (as FPGA RAM
// initialisation); lint tools note that the same array is also written in
// always_ff, which is intended here.
module tmap_table
  import tmap_pkg::*;
#(
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned W      = 12,
  parameter real         TMAP_B = 1.5e4,
  parameter int          TMAP_N = 1,
  parameter real         TS     = 1.0e-5,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr0,
  output logic [W-1:0]  rdata0,
  input  logic [AW-1:0] raddr1,
  output logic [W-1:0]  rdata1
);

  typedef logic [W-1:0] table_t [DEPTH];

  function automatic table_t template_table();
    table_t t;
    for (int k = 0; k < int'(DEPTH); k++)
      t[k] = W'(tmap_sample(k, TMAP_B, TMAP_N, TS, (2 ** W) - 1));
    return t;
  endfunction

  table_t mem;

  // Power-up contents (FPGA block/distributed RAM initial value)
  initial mem = template_table();

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata0 = mem[raddr0];
  assign rdata1 = mem[raddr1];

endmodule
