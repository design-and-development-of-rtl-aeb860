// tb_sobel_memory_top: end-to-end test of sobel_memory_top at its default size.
//
// The top is instantiated with no parameter overrides (a 128x128 frame memory). Three
// frames run through it: a full 128x128 shaded image with a rectangle and a disc, a full
// 128x128 noise image, and a 32x32 digit-like image using only part of the memory. Each
// window and each edge result is checked against the stored image and the reference
// Sobel model, frame cycle counts against (h-2)*w, and every mechanism (loads, shifts,
// clock gating, threshold decisions, ignored start) must have occurred.
module tb_sobel_memory_top;
  sobel_frame_harness h ();

  // Threshold for the noise frame chosen so that some results equal it.
  initial begin
    h.reset_dut();
    h.load_frame(1, 7, 128, 128);
    h.run_frame(128, 128, 100);
    h.load_frame(0, 3, 128, 128);
    h.run_frame(128, 128, 255);
    h.load_frame(2, 4, 32, 32);
    h.run_frame(32, 32, 128);
    h.report(1'b1);
  end

  initial begin
    repeat (400000) @(posedge h.clk);
    h.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
endmodule
