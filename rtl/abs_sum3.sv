// abs_sum3: the |X+Y+Z| adder of the Sobel datapath.
//
// Adds three signed terms (differences of pixels, the middle one already doubled by
// the caller) and returns the absolute value of the sum. Purely combinational. With
// 9-bit pixel differences and a doubled middle term the sum lies in -1020..1020, so
// IN_W = 10 and OUT_W = 11 are enough; the defaults match that use.
module abs_sum3 #(
  parameter int unsigned IN_W  = 10,
  parameter int unsigned OUT_W = 11
) (
  input  logic signed [IN_W-1:0] x,
  input  logic signed [IN_W-1:0] y,
  input  logic signed [IN_W-1:0] z,
  output logic        [OUT_W-1:0] abs_sum
);
  logic signed [IN_W+1:0] sum;

  always_comb begin
    sum = (IN_W+2)'(x) + (IN_W+2)'(y) + (IN_W+2)'(z);
    abs_sum = OUT_W'(sum < 0 ? -sum : sum);
  end
endmodule
