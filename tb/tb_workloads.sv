// tb_workloads: the small image sizes at the design's default memory size (128x128).
//
// Runs, in one 128x128 build with no parameter overrides, frames of 10 rows x 40
// columns, 40 x 10, 10 x 20 and 20 x 10, then ten 32x32 digit-like images (digits 0..9,
// 1024 pixels each). Every window and edge pixel is compared with the reference Sobel
// model, and the number of wrong edge pixels is printed per image (expected 0).
module tb_workloads;
  sobel_frame_harness h ();

  initial begin
    h.reset_dut();
    h.load_frame(1, 1, 40, 10);  h.run_frame(40, 10, 90);
    h.load_frame(1, 2, 10, 40);  h.run_frame(10, 40, 90);
    h.load_frame(0, 3, 20, 10);  h.run_frame(20, 10, 200);
    h.load_frame(1, 4, 10, 20);  h.run_frame(10, 20, 60);
    for (int d = 0; d < 10; d++) begin
      automatic int err0 = h.frame_errors();
      h.load_frame(2, d, 32, 32);
      h.run_frame(32, 32, 150);
      $display("digit image %0d (32x32, 1024 pixels): %0d wrong results", d,
               h.frame_errors() - err0);
    end
    h.report(1'b0);
  end

  initial begin
    repeat (200000) @(posedge h.clk);
    h.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
endmodule
