// line_buffer: one image row held as a parallel-load shift register.
//
// load copies a whole row (IMG_W pixels) from the pixel memory in one cycle. Each
// shift then moves the row one pixel towards column 0, so after k shifts tap0, tap1 and
// tap2 are the pixels of columns k, k+1 and k+2: three neighbouring pixels of the row
// for the 3x3 window. The vacated end fills with zeros, which the window never uses
// because only IMG_W-2 shifts are made per row. load wins over shift. Taps are read
// straight from the register (no extra latency); updates take effect on the rising edge
// of clk, which is normally the gated clock of the window logic. Copy-then-shift
// follows the design description; the register form is this design's choice. The pixel
// contents are not reset.
module line_buffer
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W = 128
) (
  input  logic               clk,
  input  logic               load,
  input  logic               shift,
  input  pixel_t [IMG_W-1:0] din,
  output pixel_t             tap0,
  output pixel_t             tap1,
  output pixel_t             tap2
);
  pixel_t [IMG_W-1:0] q;

  always_ff @(posedge clk) begin
    if (load)       q <= din;
    else if (shift) q <= {PIX_W'(0), q[IMG_W-1:1]};
  end

  assign tap0 = q[0];
  assign tap1 = q[1];
  assign tap2 = q[2];
endmodule
