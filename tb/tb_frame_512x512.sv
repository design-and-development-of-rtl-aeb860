// tb_frame_512x512: one 512x512 frame through a memory sized for it.
//
// The top is built with IMG_W = 512 and IMG_H = 512 (the memory is sized by the image
// resolution). A shaded image with a rectangle and a disc is loaded and processed; every
// window and edge pixel is compared with the reference Sobel model and the frame must
// take (512-2)*512 cycles.
module tb_frame_512x512;
  sobel_frame_harness #(.IMG_W(512), .IMG_H(512), .OVERRIDE(1'b1)) h ();

  initial begin
    h.reset_dut();
    h.load_frame(1, 11, 512, 512);
    h.run_frame(512, 512, 80);
    h.report(1'b0);
  end

  initial begin
    repeat (786432) @(posedge h.clk);
    h.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
endmodule
