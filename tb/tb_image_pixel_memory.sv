// tb_image_pixel_memory: write/read test of the three-row frame memory.
//
// A 12x7 memory is filled with random pixels through the write port (random order,
// some pixels written twice) while a reference copy is kept. Every legal row address
// 0..IMG_H-3 is then read, in random order: one cycle after rd_en, dout1/dout2/dout3
// must hold rows r, r+1, r+2. Outputs must hold their value while rd_en is low.
module tb_image_pixel_memory;
  import sobel_pkg::*;
  localparam int W = 12, H = 7;
  localparam int RW = $clog2(H), CW = $clog2(W);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [RW-1:0] wr_row = 0, rd_row = 0;
  logic [CW-1:0] wr_col = 0;
  pixel_t wr_data = 0;
  pixel_t [W-1:0] dout1, dout2, dout3;
  int checks = 0, failures = 0;
  pixel_t ref_img [H][W];

  image_pixel_memory #(.IMG_W(W), .IMG_H(H)) dut (.*);

  task automatic check_rows(input int r);
    bit ok = 1;
    for (int c = 0; c < W; c++)
      ok &= dout1[c] == ref_img[r][c] && dout2[c] == ref_img[r+1][c] && dout3[c] == ref_img[r+2][c];
    checks++;
    if (!ok) begin failures++; $display("FAIL rows at %0d", r); end
  endtask

  initial begin
    // fill in order, then overwrite random pixels
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        ref_img[r][c] = pixel_t'($urandom);
        wr_en = 1; wr_row = RW'(r); wr_col = CW'(c); wr_data = ref_img[r][c];
      end
    repeat (30) begin
      automatic int r = $urandom_range(0, H-1), c = $urandom_range(0, W-1);
      @(negedge clk);
      ref_img[r][c] = pixel_t'($urandom);
      wr_en = 1; wr_row = RW'(r); wr_col = CW'(c); wr_data = ref_img[r][c];
    end
    @(negedge clk) wr_en = 0;
    for (int k = 0; k < 40; k++) begin
      automatic int r = (k < H-2) ? k : $urandom_range(0, H-3);
      rd_en = 1; rd_row = RW'(r);
      @(negedge clk);
      rd_en = 0; rd_row = RW'($urandom_range(0, H-3));
      check_rows(r);
      @(negedge clk);
      check_rows(r);   // held while rd_en is low
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
