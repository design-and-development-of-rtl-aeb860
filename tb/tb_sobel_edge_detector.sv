// tb_sobel_edge_detector: Sobel datapath against the reference kernels.
//
// Drives bursts of back-to-back windows (random, extreme black/white patterns, near-
// flat patches and the strongest possible edge, magnitude 1530), each burst with its
// own threshold, some thresholds equal to a window's magnitude. |Gx| and |Gy| must
// appear 1 cycle after the window; the result exactly 2 cycles after it, with the
// 12-bit magnitude and P5' (255 if magnitude > threshold, else 0) equal to the
// reference model, and with its tag.
module tb_sobel_edge_detector;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;
  localparam int N = 3000;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // power-on reset: a falling edge for the asynchronous reset
  logic in_valid = 0, out_valid;
  window_t win = '0;
  logic [15:0] in_tag = 0, out_tag;
  logic [THR_W-1:0] threshold = 0;
  logic [GRAD_W-1:0] gx_abs, gy_abs;
  logic [MAG_W-1:0] mag;
  pixel_t edge_pix;
  int checks = 0, failures = 0, n_on = 0, n_off = 0, n_eq = 0, max_mag = 0;
  int exp_gx [N], exp_gy [N], exp_mag [N], exp_pix [N];
  int sent = 0, got = 0;
  int t_in [N];
  int cyc = 0;

  sobel_edge_detector #(.TAG_W(16)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  // |Gx| and |Gy| are the stage-1 registers: valid one cycle after the window.
  logic v1 = 1'b0;
  int got1 = 0;
  always @(posedge clk) begin
    if (v1) begin
      checks++;
      if (int'(gx_abs) != exp_gx[got1] || int'(gy_abs) != exp_gy[got1]) begin
        failures++;
        if (failures < 10) $display("FAIL #%0d gx %0d/%0d gy %0d/%0d", got1, gx_abs,
                                    exp_gx[got1], gy_abs, exp_gy[got1]);
      end
      got1++;
    end
    v1 <= in_valid;
  end

  always @(posedge clk) begin
    if (out_valid) begin
      checks++;
      if (got >= sent || int'(out_tag) != got || int'(mag) != exp_mag[got] ||
          int'(edge_pix) != exp_pix[got] || cyc - t_in[got] != 2) begin
        failures++;
        if (failures < 10)
          $display("FAIL #%0d tag %0d mag %0d/%0d pix %0d/%0d lat %0d",
                   got, out_tag, mag, exp_mag[got],
                   edge_pix, exp_pix[got], cyc - t_in[got]);
      end
      got++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Bursts of 10 back-to-back windows share one threshold, which is held until the
    // burst has left the pipeline.
    for (int i = 0; i < N; i++) begin
      int p[9];
      int thr, kind;
      kind = $urandom_range(0, 3);
      for (int k = 0; k < 9; k++) begin
        case (kind)
          0: p[k] = $urandom_range(0, 255);
          1: p[k] = $urandom_range(0, 1) ? 255 : 0;
          2: p[k] = 120 + $urandom_range(0, 12);
          default: p[k] = (k % 3 == 2 || k / 3 == 2) ? 255 : 0;  // strongest edge
        endcase
        win[k] = pixel_t'(p[k]);
      end
      if (i % 10 == 0) begin
        thr = (i % 20 == 0 && ref_mag(p) < 256) ? ref_mag(p) : $urandom_range(0, 255);
        threshold = THR_W'(thr);
      end
      exp_gx[i] = iabs(ref_gx(p)); exp_gy[i] = iabs(ref_gy(p));
      exp_mag[i] = ref_mag(p); exp_pix[i] = ref_edge(p, int'(threshold));
      if (exp_pix[i] == 255) n_on++; else n_off++;
      if (exp_mag[i] == int'(threshold)) n_eq++;
      if (exp_mag[i] > max_mag) max_mag = exp_mag[i];
      in_valid = 1; in_tag = 16'(i); t_in[i] = cyc; sent++;
      @(negedge clk);
      if (i % 10 == 9) begin
        in_valid = 0;
        repeat ($urandom_range(2, 4)) @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++; if (got != N) begin failures++; $display("FAIL got %0d results", got); end
    checks++; if (n_on == 0 || n_off == 0 || n_eq == 0) failures++;
    checks++; if (max_mag != 1530) failures++;
    $display("edges %0d, non-edges %0d, equal to threshold %0d, max magnitude %0d",
             n_on, n_off, n_eq, max_mag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
