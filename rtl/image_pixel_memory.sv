// image_pixel_memory: frame memory of IMG_H rows, each row one word of IMG_W pixels.
//
// The address is a row number and a read returns all the pixels of a row, so the
// address range is the number of rows and the data word is the columns. One read at row
// address rd_row returns three consecutive rows at once on dout1 (rd_row), dout2
// (rd_row+1) and dout3 (rd_row+2): exactly what the 3x3 window needs. The three outputs
// are registered, so the rows appear on the clock edge after rd_en (one-cycle latency,
// like a block RAM with output registers). rd_row must be at most IMG_H-3.
//
// The frame is loaded one pixel per cycle through the write port (wr_en, wr_row,
// wr_col, wr_data), or at start-up from INIT_FILE with $readmemh: one row per line, the
// row written as IMG_W*2 hex digits with column 0 in the least significant byte.
//
// clk is normally the gated clock of the memory; reads and writes happen only on its
// rising edges. Row-per-address organisation and three-row access follow the design
// description; the write port, the file layout and the one-cycle latency are this
// design's choices. Array contents are not reset.
module image_pixel_memory
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W = 128,
  parameter int unsigned IMG_H = 128,
  parameter string       INIT_FILE = "",
  localparam int unsigned RW = (IMG_H > 1) ? $clog2(IMG_H) : 1,
  localparam int unsigned CW = (IMG_W > 1) ? $clog2(IMG_W) : 1
) (
  input  logic                      clk,
  // pixel write port
  input  logic                      wr_en,
  input  logic [RW-1:0]             wr_row,
  input  logic [CW-1:0]             wr_col,
  input  pixel_t                    wr_data,
  // three-row read port
  input  logic                      rd_en,
  input  logic [RW-1:0]             rd_row,
  output pixel_t [IMG_W-1:0]        dout1,
  output pixel_t [IMG_W-1:0]        dout2,
  output pixel_t [IMG_W-1:0]        dout3
);
  typedef pixel_t [IMG_W-1:0] row_t;

  row_t mem [IMG_H];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  // Row addresses of the second and third rows, kept inside the array.
  logic [RW-1:0] row2, row3;
  always_comb begin
    row2 = (32'(rd_row) + 1 < IMG_H) ? RW'(32'(rd_row) + 1) : rd_row;
    row3 = (32'(rd_row) + 2 < IMG_H) ? RW'(32'(rd_row) + 2) : rd_row;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row][wr_col] <= wr_data;
    if (rd_en) begin
      dout1 <= mem[rd_row];
      dout2 <= mem[row2];
      dout3 <= mem[row3];
    end
  end
endmodule
