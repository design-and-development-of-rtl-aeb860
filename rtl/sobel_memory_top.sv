// sobel_memory_top: image pixel memory and 3x3 window generation for Sobel edge detection.
//
// Data path: image_pixel_memory (a row per address, three rows per read) ->
// pixel_matrix_gen (three line buffers and the P0..P8 window register) ->
// sobel_edge_detector (|Gx|+|Gy|, threshold, P5' = 255 or 0). frame_controller scans
// the window over the frame and drives three clock gates, so the memory, the window
// logic and the Sobel datapath are clocked only when they have work: the memory on
// reads and writes, the window logic on load and shift cycles, the Sobel unit while it
// holds windows.
//
// Use: load the frame through wr_en/wr_row/wr_col/wr_data while busy is low, then pulse
// start with the active size cfg_w x cfg_h (3..IMG_W x 3..IMG_H) and a threshold. The
// window stream (win_valid, win = P0..P8 row-major, win_row/win_col = top-left pixel)
// and the edge stream (edge_valid, edge_pix, edge_mag, edge_row/edge_col = the centre
// pixel, i.e. window top-left + 1) follow in raster order of the window positions. The
// first window appears 3 cycles after start, each edge result 2 cycles after its
// window; a frame occupies the controller for (cfg_h-2)*cfg_w cycles. Border pixels
// (row 0, row cfg_h-1, column 0, column cfg_w-1) get no result. threshold must be held
// stable while busy. rst_n is asynchronous, active low.
module sobel_memory_top
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W = 128,
  parameter int unsigned IMG_H = 128,
  localparam int unsigned RW  = (IMG_H > 1) ? $clog2(IMG_H) : 1,
  localparam int unsigned CW  = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int unsigned RW1 = $clog2(IMG_H + 1),
  localparam int unsigned CW1 = $clog2(IMG_W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // frame load
  input  logic             wr_en,
  input  logic [RW-1:0]    wr_row,
  input  logic [CW-1:0]    wr_col,
  input  pixel_t           wr_data,
  // frame command
  input  logic             start,
  input  logic [CW1-1:0]   cfg_w,
  input  logic [RW1-1:0]   cfg_h,
  input  logic [THR_W-1:0] threshold,
  output logic             busy,
  output logic             done,
  // 3x3 pixel matrix stream
  output logic             win_valid,
  output window_t          win,
  output logic [RW-1:0]    win_row,
  output logic [CW-1:0]    win_col,
  // edge stream
  output logic             edge_valid,
  output pixel_t           edge_pix,
  output logic [MAG_W-1:0] edge_mag,
  output logic [RW-1:0]    edge_row,
  output logic [CW-1:0]    edge_col
);
  logic             rd_en, lb_load, lb_shift;
  logic [RW-1:0]    rd_row, row;
  logic [CW-1:0]    col;
  logic             mem_clk_en, win_clk_en, sobel_clk_en;
  logic             mem_gclk, win_gclk, sobel_gclk;
  pixel_t [IMG_W-1:0] dout1, dout2, dout3;

  frame_controller #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_ctrl (
    .clk, .rst_n, .start, .cfg_w, .cfg_h, .wr_en,
    .rd_en, .rd_row, .lb_load, .lb_shift, .row, .col, .busy, .done,
    .mem_clk_en, .win_clk_en, .sobel_clk_en);

  clock_gate u_cg_mem   (.clk, .en(mem_clk_en),   .gclk(mem_gclk));
  clock_gate u_cg_win   (.clk, .en(win_clk_en),   .gclk(win_gclk));
  clock_gate u_cg_sobel (.clk, .en(sobel_clk_en), .gclk(sobel_gclk));

  image_pixel_memory #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_mem (
    .clk(mem_gclk), .wr_en, .wr_row, .wr_col, .wr_data,
    .rd_en, .rd_row, .dout1, .dout2, .dout3);

  pixel_matrix_gen #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_matrix (
    .clk(win_gclk), .rst_n, .load(lb_load), .shift(lb_shift),
    .row_in(row), .col_in(col), .dout1, .dout2, .dout3,
    .win, .win_valid, .win_row, .win_col);

  logic [GRAD_W-1:0]  gx_abs, gy_abs;
  logic [RW+CW-1:0]   edge_tag;
  sobel_edge_detector #(.TAG_W(RW+CW)) u_sobel (
    .clk(sobel_gclk), .rst_n, .in_valid(win_valid), .win,
    .in_tag({win_row, win_col}), .threshold,
    .out_valid(edge_valid), .gx_abs, .gy_abs, .mag(edge_mag), .edge_pix,
    .out_tag(edge_tag));

  // Window coordinates are the top-left pixel; the result belongs to the centre pixel.
  assign edge_row = edge_tag[RW+CW-1:CW] + 1'b1;
  assign edge_col = edge_tag[CW-1:0] + 1'b1;

`ifndef SYNTHESIS
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !wr_en)
    else $error("sobel_memory_top: pixel write while a frame is processed");
`endif
endmodule
