// tb_frame_controller: cycle-by-cycle check of the frame scan.
//
// For several active sizes inside a 10x8 memory the expected control sequence is built
// independently: for each row triple r = 0..h-3 one READ cycle (rd_en, rd_row = r), one
// LOAD cycle, then w-2 SHIFT cycles with (row, col) = (r, c). After start the outputs
// are compared with it on every cycle, including busy, the done pulse on the last shift,
// the frame length (h-2)*w and the three clock-gate enables. A start while busy must be
// ignored; wr_en must open the memory clock gate.
module tb_frame_controller;
  localparam int W = 10, H = 8;
  localparam int RW = $clog2(H), CW = $clog2(W), RW1 = $clog2(H+1), CW1 = $clog2(W+1);
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // power-on reset: a falling edge for the asynchronous reset
  logic start = 0, wr_en = 0;
  logic [CW1-1:0] cfg_w = 0;
  logic [RW1-1:0] cfg_h = 0;
  logic rd_en, lb_load, lb_shift, busy, done, mem_clk_en, win_clk_en, sobel_clk_en;
  logic [RW-1:0] rd_row, row;
  logic [CW-1:0] col;
  int checks = 0, failures = 0;

  frame_controller #(.IMG_W(W), .IMG_H(H)) dut (.*);

  typedef struct { bit rd, ld, sh; int r, c; } step_t;

  task automatic run(input int w, input int h, input bit restart);
    step_t seq[$];
    bit sh_hist[3] = '{0, 0, 0};
    for (int r = 0; r <= h-3; r++) begin
      seq.push_back('{1, 0, 0, r, 0});
      seq.push_back('{0, 1, 0, r, 0});
      for (int c = 0; c <= w-3; c++) seq.push_back('{0, 0, 1, r, c});
    end
    @(negedge clk);
    cfg_w = CW1'(w); cfg_h = RW1'(h); start = 1;
    @(negedge clk) start = 0; cfg_w = CW1'(3); cfg_h = RW1'(3);
    for (int i = 0; i < seq.size(); i++) begin
      bit ok;
      if (restart && i == 4) start = 1;   // must be ignored
      #1;
      ok = rd_en == seq[i].rd && lb_load == seq[i].ld && lb_shift == seq[i].sh && busy;
      if (seq[i].rd) ok &= int'(rd_row) == seq[i].r;
      if (seq[i].sh) ok &= int'(row) == seq[i].r && int'(col) == seq[i].c;
      ok &= done == (i == seq.size() - 1);
      ok &= mem_clk_en == seq[i].rd;
      ok &= win_clk_en == (seq[i].ld || seq[i].sh || sh_hist[0]);
      ok &= sobel_clk_en == (sh_hist[0] || sh_hist[1] || sh_hist[2]);
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL %0dx%0d step %0d: rd %b ld %b sh %b row %0d col %0d done %b en %b%b%b",
                                    w, h, i, rd_en, lb_load, lb_shift, row, col, done, mem_clk_en, win_clk_en, sobel_clk_en);
      end
      sh_hist[2] = sh_hist[1];
      sh_hist[1] = sh_hist[0];
      sh_hist[0] = seq[i].sh;
      @(negedge clk);
      start = 0;
    end
    // pipeline drain: Sobel clock stays on for three more cycles, then everything is off
    for (int k = 0; k < 4; k++) begin
      #1;
      checks++;
      if (busy || rd_en || lb_load || lb_shift || done || mem_clk_en ||
          win_clk_en != (k == 0) || sobel_clk_en != (k < 3)) begin
        failures++; $display("FAIL drain %0d", k);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    wr_en = 1; #1;
    checks++; if (!mem_clk_en || busy) failures++;
    @(negedge clk) wr_en = 0;
    run(10, 8, 1);
    run(5, 4, 0);
    run(3, 3, 1);
    run(7, 8, 0);
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
