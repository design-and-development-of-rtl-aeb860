// pixel_matrix_gen: forms the 3x3 pixel matrix P0..P8 from three consecutive rows.
//
// Three line buffers take rows r, r+1 and r+2 from the pixel memory (load). On every
// shift cycle the first three pixels of each line buffer are captured into the window
// register and all three line buffers advance by one pixel, so consecutive shift cycles
// produce the windows at columns c = 0, 1, 2, ... of the row triple:
//
//     P0 P1 P2     row r,   columns c..c+2
//     P3 P4 P5     row r+1
//     P6 P7 P8     row r+2
//
// win, win_row and win_col (top-left pixel of the window) are valid in the cycle after
// the shift request, flagged by win_valid. clk is normally the gated clock of the
// window logic; its enable must stay on for one cycle after the last shift so that
// win_valid can return to 0. rst_n (asynchronous, active low) clears win_valid only.
// Line buffers plus window register follow the design description; the exact timing
// is this design's choice.
module pixel_matrix_gen
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W = 128,
  parameter int unsigned IMG_H = 128,
  localparam int unsigned RW = (IMG_H > 1) ? $clog2(IMG_H) : 1,
  localparam int unsigned CW = (IMG_W > 1) ? $clog2(IMG_W) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic               shift,
  input  logic [RW-1:0]      row_in,
  input  logic [CW-1:0]      col_in,
  input  pixel_t [IMG_W-1:0] dout1,
  input  pixel_t [IMG_W-1:0] dout2,
  input  pixel_t [IMG_W-1:0] dout3,
  output window_t            win,
  output logic               win_valid,
  output logic [RW-1:0]      win_row,
  output logic [CW-1:0]      win_col
);
  pixel_t [2:0][2:0] taps;   // taps[line][column offset]

  line_buffer #(.IMG_W(IMG_W)) u_lb1 (
    .clk, .load, .shift, .din(dout1), .tap0(taps[0][0]), .tap1(taps[0][1]), .tap2(taps[0][2]));
  line_buffer #(.IMG_W(IMG_W)) u_lb2 (
    .clk, .load, .shift, .din(dout2), .tap0(taps[1][0]), .tap1(taps[1][1]), .tap2(taps[1][2]));
  line_buffer #(.IMG_W(IMG_W)) u_lb3 (
    .clk, .load, .shift, .din(dout3), .tap0(taps[2][0]), .tap1(taps[2][1]), .tap2(taps[2][2]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) win_valid <= 1'b0;
    else        win_valid <= shift && !load;
  end

  always_ff @(posedge clk) begin
    if (shift && !load) begin
      for (int l = 0; l < 3; l++)
        for (int k = 0; k < 3; k++)
          win[3*l + k] <= taps[l][k];
      win_row <= row_in;
      win_col <= col_in;
    end
  end
endmodule
