// sobel_frame_harness: clock, reset, sobel_memory_top and checking for whole frames.
//
// The enclosing testbench calls the tasks below by hierarchical name:
//   load_frame(kind, seed, w, h)  generate a w x h test image (sobel_ref_pkg::test_pixel),
//                                 keep a copy and write it through the pixel write port
//   run_frame(w, h, thr)          pulse start, wait for the frame to finish, then check
//                                 the number of windows and edge results and the cycle
//                                 count (h-2)*w from start to the last window
//   report(all)                   list how often each mechanism of the design happened
//                                 (with all = 1, count a failure for each that never did),
//                                 print the TB_RESULT line and finish
//   frame_errors()                failed checks so far, to report errors per image
// Monitors compare every window P0..P8 with the stored image at its coordinates, every
// edge result (magnitude and P5') with the reference model, and the raster order of both
// streams. They also count how often each mechanism happened: pixel writes, three-row
// reads, line-buffer loads, shifts, row advances, edges and non-edges, results exactly
// at the threshold, cycles on which each clock gate held its clock off, starts ignored
// while busy and frames smaller than the memory.
module sobel_frame_harness
  import sobel_pkg::*;
  import sobel_ref_pkg::*;
#(
  parameter int unsigned IMG_W = 128,
  parameter int unsigned IMG_H = 128,
  parameter bit          OVERRIDE = 1'b0   // 0: instantiate the top with its defaults
) ();
  localparam int unsigned RW  = (IMG_H > 1) ? $clog2(IMG_H) : 1;
  localparam int unsigned CW  = (IMG_W > 1) ? $clog2(IMG_W) : 1;
  localparam int unsigned RW1 = $clog2(IMG_H + 1);
  localparam int unsigned CW1 = $clog2(IMG_W + 1);

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic             wr_en = 1'b0;
  logic [RW-1:0]    wr_row = '0;
  logic [CW-1:0]    wr_col = '0;
  pixel_t           wr_data = '0;
  logic             start = 1'b0;
  logic [CW1-1:0]   cfg_w = CW1'(IMG_W);
  logic [RW1-1:0]   cfg_h = RW1'(IMG_H);
  logic [THR_W-1:0] threshold = '0;
  logic             busy, done, win_valid, edge_valid;
  window_t          win;
  logic [RW-1:0]    win_row, edge_row;
  logic [CW-1:0]    win_col, edge_col;
  pixel_t           edge_pix;
  logic [MAG_W-1:0] edge_mag;

  if (OVERRIDE) begin : g_dut
    sobel_memory_top #(.IMG_W(IMG_W), .IMG_H(IMG_H)) dut (.*);
  end else begin : g_dut
    sobel_memory_top dut (.*);
  end

  int checks = 0, failures = 0;
  int img [IMG_H][IMG_W];
  int cur_w = IMG_W, cur_h = IMG_H, cur_thr = 0;

  // mechanism counters
  int n_writes = 0, n_reads = 0, n_loads = 0, n_shifts = 0, n_row_adv = 0;
  int n_win = 0, n_edge = 0, n_edge_on = 0, n_edge_off = 0, n_at_thr = 0;
  int n_gated_mem = 0, n_gated_win = 0, n_gated_sobel = 0;
  int n_ignored_start = 0, n_small_frame = 0, n_frames = 0;
  int exp_win_r = 0, exp_win_c = 0, exp_edge_r = 0, exp_edge_c = 0;
  int cyc = 0, t_start = 0, t_last = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (g_dut.dut.u_ctrl.rd_en)   n_reads++;
    if (g_dut.dut.u_ctrl.lb_load) n_loads++;
    if (g_dut.dut.u_ctrl.lb_shift) n_shifts++;
    if (wr_en) n_writes++;
    if (g_dut.dut.u_ctrl.lb_shift && g_dut.dut.u_ctrl.col == g_dut.dut.u_ctrl.last_col &&
        !done) n_row_adv++;
    if (done) t_last = cyc;
  end

  // A gate holds its clock off when clk rises and the gated clock stays low.
  always @(posedge clk) begin
    #1;
    if (!g_dut.dut.mem_gclk)   n_gated_mem++;
    if (!g_dut.dut.win_gclk)   n_gated_win++;
    if (!g_dut.dut.sobel_gclk) n_gated_sobel++;
  end

  // Window stream: P0..P8 must equal the image around (win_row, win_col), in raster order.
  always @(posedge clk) begin
    if (rst_n && win_valid) begin
      bit ok;
      ok = (int'(win_row) == exp_win_r) && (int'(win_col) == exp_win_c);
      for (int k = 0; k < 9; k++)
        ok &= int'(win[k]) == img[exp_win_r + k/3][exp_win_c + k%3];
      check(ok, $sformatf("window at (%0d,%0d), got (%0d,%0d)", exp_win_r, exp_win_c,
                          win_row, win_col));
      n_win++;
      if (exp_win_c == cur_w - 3) begin exp_win_c = 0; exp_win_r++; end
      else exp_win_c++;
    end
  end

  // Edge stream: magnitude and P5' against the reference model.
  always @(posedge clk) begin
    if (rst_n && edge_valid) begin
      int p[9];
      int m, e;
      for (int k = 0; k < 9; k++) p[k] = img[exp_edge_r + k/3][exp_edge_c + k%3];
      m = ref_mag(p);
      e = ref_edge(p, cur_thr);
      check(int'(edge_row) == exp_edge_r + 1 && int'(edge_col) == exp_edge_c + 1 &&
            int'(edge_mag) == m && int'(edge_pix) == e,
            $sformatf("edge at (%0d,%0d): mag %0d/%0d pix %0d/%0d", exp_edge_r + 1,
                      exp_edge_c + 1, edge_mag, m, edge_pix, e));
      n_edge++;
      if (e == 255) n_edge_on++; else n_edge_off++;
      if (m == cur_thr) n_at_thr++;
      if (exp_edge_c == cur_w - 3) begin exp_edge_c = 0; exp_edge_r++; end
      else exp_edge_c++;
    end
  end

  function automatic int frame_errors();
    return failures;
  endfunction

  task automatic reset_dut();
    #1 rst_n = 1'b0;   // falling edge for the asynchronous reset
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk);
  endtask

  task automatic load_frame(input int kind, input int seed, input int w, input int h);
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        img[r][c] = test_pixel(kind, seed, r, c, w, h);
        @(negedge clk);
        wr_en = 1'b1; wr_row = RW'(r); wr_col = CW'(c); wr_data = pixel_t'(img[r][c]);
      end
    @(negedge clk) wr_en = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  task automatic run_frame(input int w, input int h, input int thr);
    int win0, edge0;
    cur_w = w; cur_h = h; cur_thr = thr;
    exp_win_r = 0; exp_win_c = 0; exp_edge_r = 0; exp_edge_c = 0;
    win0 = n_win; edge0 = n_edge;
    if (w < int'(IMG_W) || h < int'(IMG_H)) n_small_frame++;
    @(negedge clk);
    cfg_w = CW1'(w); cfg_h = RW1'(h); threshold = THR_W'(thr); start = 1'b1;
    t_start = cyc;
    @(negedge clk) start = 1'b0;
    check(busy, "busy after start");
    // a second start in mid-frame must be ignored
    repeat (w + 3) @(negedge clk);
    if (busy) begin
      start = 1'b1; cfg_w = CW1'(3); cfg_h = RW1'(3);
      @(negedge clk) start = 1'b0;
      n_ignored_start++;
    end
    wait (!busy);
    repeat (6) @(negedge clk);
    check(n_win - win0 == (w-2)*(h-2), $sformatf("windows %0d, expected %0d", n_win - win0, (w-2)*(h-2)));
    check(n_edge - edge0 == (w-2)*(h-2), $sformatf("edges %0d, expected %0d", n_edge - edge0, (w-2)*(h-2)));
    // start sampled at t_start; the last shift (done) is the (h-2)*w-th cycle after it
    check(t_last - t_start == (h-2)*w, $sformatf("frame took %0d cycles, expected %0d",
                                                 t_last - t_start, (h-2)*w));
    n_frames++;
    $display("frame %0dx%0d thr %0d: %0d windows, %0d cycles", w, h, thr, n_win - win0,
             t_last - t_start);
  endtask

  bit require_all = 1'b1;

  task automatic mechanism(input int count, input string what);
    $display("  %-34s %0d", what, count);
    if (require_all) check(count > 0, {"mechanism never happened: ", what});
  endtask

  task automatic report(input bit all_mechanisms);
    require_all = all_mechanisms;
    $display("mechanisms:");
    mechanism(n_writes,        "pixel writes");
    mechanism(n_reads,         "three-row reads");
    mechanism(n_loads,         "line buffer loads");
    mechanism(n_shifts,        "line buffer shifts");
    mechanism(n_row_adv,       "row advances");
    mechanism(n_edge_on,       "edge pixels (255)");
    mechanism(n_edge_off,      "non-edge pixels (0)");
    mechanism(n_at_thr,        "magnitude equal to threshold");
    mechanism(n_gated_mem,     "memory clock held off");
    mechanism(n_gated_win,     "window clock held off");
    mechanism(n_gated_sobel,   "Sobel clock held off");
    mechanism(n_ignored_start, "start ignored while busy");
    mechanism(n_frames,        "frames completed");
    // Clock activity of the gated domains, relative to the free-running clock.
    $display("clock pulses delivered, of %0d cycles: memory %0d%%, window %0d%%, Sobel %0d%%",
             cyc, 100 - (100 * n_gated_mem) / cyc, 100 - (100 * n_gated_win) / cyc,
             100 - (100 * n_gated_sobel) / cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
