// sobel_edge_detector: decides whether the centre pixel of a 3x3 window is an edge.
//
// With the window numbered P1..P9 row-major (win[0] = P1 ... win[8] = P9), six 9-bit
// subtractors form P3-P1, P6-P4, P9-P7 (columns) and P7-P1, P8-P2, P9-P3 (rows). The
// middle difference of each group is doubled by a left shift, and two |X+Y+Z| adders
// give
//     |Gx| = |(P3-P1) + 2(P6-P4) + (P9-P7)|
//     |Gy| = |(P7-P1) + 2(P8-P2) + (P9-P3)|
// which are registered (stage 1). Stage 2 adds them into the 12-bit magnitude, compares
// it with the 8-bit threshold and selects P5' = 255 when magnitude > threshold and 0
// otherwise; P5', the magnitude and the stage-1 values are registered outputs.
//
// Timing: one window per cycle; out_valid follows in_valid by 2 cycles. The tag input
// (for example the pixel coordinates) travels with the data. clk is normally the gated
// clock of this block; its enable must cover the two cycles after the last in_valid.
// rst_n (asynchronous, active low) clears the valid flags. The datapath follows the
// design description; the output register and the treatment of magnitude equal to the
// threshold (no edge) are this design's choices.
module sobel_edge_detector
  import sobel_pkg::*;
#(
  parameter int unsigned TAG_W = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  window_t            win,
  input  logic [TAG_W-1:0]   in_tag,
  input  logic [THR_W-1:0]   threshold,
  output logic               out_valid,
  output logic [GRAD_W-1:0]  gx_abs,
  output logic [GRAD_W-1:0]  gy_abs,
  output logic [MAG_W-1:0]   mag,
  output pixel_t             edge_pix,
  output logic [TAG_W-1:0]   out_tag
);
  typedef logic signed [PIX_W:0]   diff_t;  // 9-bit pixel difference
  typedef logic signed [PIX_W+1:0] term_t;  // 10-bit term

  function automatic diff_t sub(input pixel_t a, input pixel_t b);
    return diff_t'({1'b0, a}) - diff_t'({1'b0, b});
  endfunction

  // Subtractor blocks, named after the document's P1..P9.
  diff_t d31, d64, d97, d71, d82, d93;
  always_comb begin
    d31 = sub(win[2], win[0]);
    d64 = sub(win[5], win[3]);
    d97 = sub(win[8], win[6]);
    d71 = sub(win[6], win[0]);
    d82 = sub(win[7], win[1]);
    d93 = sub(win[8], win[2]);
  end

  logic [GRAD_W-1:0] gx_c, gy_c;
  abs_sum3 #(.IN_W(PIX_W+2), .OUT_W(GRAD_W)) u_abs_gx (
    .x(term_t'(d31)), .y(term_t'(d64) <<< 1), .z(term_t'(d97)), .abs_sum(gx_c));
  abs_sum3 #(.IN_W(PIX_W+2), .OUT_W(GRAD_W)) u_abs_gy (
    .x(term_t'(d71)), .y(term_t'(d82) <<< 1), .z(term_t'(d93)), .abs_sum(gy_c));

  // Stage 1: gradient registers.
  logic             s1_valid;
  logic [TAG_W-1:0] s1_tag;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end
  always_ff @(posedge clk) begin
    if (in_valid) begin
      gx_abs <= gx_c;
      gy_abs <= gy_c;
      s1_tag <= in_tag;
    end
  end

  // Stage 2: magnitude, comparator and output multiplexer.
  logic [MAG_W-1:0] mag_c;
  logic             is_edge;
  always_comb begin
    mag_c   = MAG_W'(gx_abs) + MAG_W'(gy_abs);
    is_edge = mag_c > MAG_W'(threshold);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_valid;
  end
  always_ff @(posedge clk) begin
    if (s1_valid) begin
      mag      <= mag_c;
      edge_pix <= is_edge ? EDGE_ON : EDGE_OFF;
      out_tag  <= s1_tag;
    end
  end
endmodule
