// scrambler - bit-reversal re-ordering of the sigma-delta bitstream.
//
// The incoming bitstream is cut into frames of 2^F bits. During a frame the
// bits are written, in arrival order, into one of two frame buffers, while the
// previous frame is played out of the other buffer in bit-reversed order:
// output slot i carries stored bit bitrev(i). For F = 3 the slots read stored
// bits 0,4,2,6,1,5,3,7, so a frame 11111000 leaves as 11101010. Each frame
// keeps its number of ones (its duty cycle), but a long pulse is split into
// many short ones spread over the frame, which pushes the ripple to higher
// frequencies where the output low-pass filter removes it. The frame length
// 2^10 matches the 10-bit resolution of the design; double buffering is this
// design's choice. Timing: a bit that arrives in slot j of frame f leaves in
// the slot i of frame f+1 with bitrev(i) = j; 'dout' is registered. Until the
// first frame has been stored, 'valid' is low and 'dout' is 0. 'en' is a
// clock enable for both sides.
module scrambler #(
  parameter int unsigned F = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic din,
  output logic dout,
  output logic valid
);

  localparam int unsigned L = 2 ** F;

  logic [L-1:0] frame_buf [2];
  logic [F-1:0] slot;
  logic         wsel;      // buffer being written
  logic [F-1:0] rslot;

  always_comb begin
    for (int b = 0; b < int'(F); b++) rslot[b] = slot[F-1-b];
  end

  always_ff @(posedge clk) begin
    if (en) frame_buf[wsel][slot] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot  <= '0;
      wsel  <= 1'b0;
      valid <= 1'b0;
      dout  <= 1'b0;
    end else if (en) begin
      slot <= slot + 1'b1;
      dout <= valid & frame_buf[~wsel][rslot];
      if (slot == F'(L - 1)) begin
        wsel  <= ~wsel;
        valid <= 1'b1;
      end
    end
  end

endmodule
