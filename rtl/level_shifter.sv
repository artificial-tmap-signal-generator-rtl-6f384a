// level_shifter - behavioural model of the output level shifter.
//
// Not synthesizable: an analog model for simulation only. It maps a logic
// bit to a voltage, 1 => VHIGH and 0 => VLOW. With the defaults +3.3 V and
// -3.3 V it is the shifter placed after each noise output, which removes the
// DC offset of the noise bitstream so the noise is zero-mean. With VLOW = 0 it
// models a plain 3.3 V FPGA output pin driving a TMAP channel's filter.
// Combinational, no delay.
module level_shifter #(
  parameter real VHIGH = 3.3,
  parameter real VLOW  = -3.3
) (
  input  logic din,
  output real  vout
);

  assign vout = din ? VHIGH : VLOW;

endmodule
