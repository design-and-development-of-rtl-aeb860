// tb_pixel_matrix_gen: 3x3 window generation from three rows.
//
// For several random row triples of a 9-pixel-wide image: load the three rows, then
// request W-2 shifts (with random gaps). Each shift must give, one cycle later,
// win_valid with P0..P8 = rows r..r+2, columns c..c+2 (row-major) and the coordinates
// given with the request; win_valid must be low on cycles without a shift.
module tb_pixel_matrix_gen;
  import sobel_pkg::*;
  localparam int W = 9, H = 16;
  localparam int RW = $clog2(H), CW = $clog2(W);
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // power-on reset: a falling edge for the asynchronous reset
  logic load = 0, shift = 0;
  logic [RW-1:0] row_in = 0, win_row;
  logic [CW-1:0] col_in = 0, win_col;
  pixel_t [W-1:0] dout1, dout2, dout3;
  window_t win;
  logic win_valid;
  pixel_t rows [3][W];
  int checks = 0, failures = 0;

  pixel_matrix_gen #(.IMG_W(W), .IMG_H(H)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (win_valid) failures++;
    for (int t = 0; t < 12; t++) begin
      automatic int r = $urandom_range(0, H-3);
      for (int c = 0; c < W; c++) begin
        rows[0][c] = pixel_t'($urandom); rows[1][c] = pixel_t'($urandom); rows[2][c] = pixel_t'($urandom);
        dout1[c] = rows[0][c]; dout2[c] = rows[1][c]; dout3[c] = rows[2][c];
      end
      load = 1;
      @(negedge clk) load = 0;
      checks++; if (win_valid) begin failures++; $display("FAIL valid after load"); end
      for (int c = 0; c <= W-3; c++) begin
        bit ok;
        if ($urandom_range(0, 2) == 0) begin
          @(negedge clk);
          checks++; if (win_valid) begin failures++; $display("FAIL valid without shift"); end
        end
        shift = 1; row_in = RW'(r); col_in = CW'(c);
        @(negedge clk) shift = 0; row_in = '0; col_in = '0;
        ok = win_valid && int'(win_row) == r && int'(win_col) == c;
        for (int k = 0; k < 9; k++) ok &= win[k] == rows[k/3][c + k%3];
        checks++;
        if (!ok) begin failures++; $display("FAIL window triple %0d col %0d", t, c); end
      end
      @(negedge clk);
      checks++; if (win_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
