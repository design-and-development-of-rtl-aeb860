// sobel_pkg: types and constants shared by the pixel memory, window and Sobel blocks.
//
// Pixels are 8-bit grey levels (0 black, 255 white). A 3x3 window is nine pixels held
// in row-major order: index 0..2 is the top row, 3..5 the middle row (index 4 is the
// centre pixel) and 6..8 the bottom row. The gradient magnitude |Gx|+|Gy| is carried in
// 12 bits and compared with an 8-bit threshold; an edge pixel is written as 255 and a
// non-edge pixel as 0. These widths and values follow the design description; the
// window ordering is this design's convention.
package sobel_pkg;
  localparam int unsigned PIX_W = 8;   // bits per pixel
  localparam int unsigned MAG_W = 12;  // gradient magnitude |Gx|+|Gy|
  localparam int unsigned THR_W = 8;   // edge threshold
  localparam int unsigned GRAD_W = 11; // |Gx| or |Gy| (at most 4*255 = 1020)

  typedef logic [PIX_W-1:0] pixel_t;
  typedef pixel_t [8:0] window_t;      // window[k] = Pk, row-major

  localparam pixel_t EDGE_ON  = 8'd255;
  localparam pixel_t EDGE_OFF = 8'd0;
endpackage
