// tb_frame_320x240: one 320x240 frame through a memory sized for it.
//
// The top is built with IMG_W = 320 and IMG_H = 240 (the memory is sized by the image
// resolution). A shaded image with a rectangle and a disc is loaded and processed; every
// window and edge pixel is compared with the reference Sobel model and the frame must
// take (240-2)*320 cycles.
module tb_frame_320x240;
  sobel_frame_harness #(.IMG_W(320), .IMG_H(240), .OVERRIDE(1'b1)) h ();

  initial begin
    h.reset_dut();
    h.load_frame(1, 11, 320, 240);
    h.run_frame(320, 240, 80);
    h.report(1'b0);
  end

  initial begin
    repeat (230400) @(posedge h.clk);
    h.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
endmodule
