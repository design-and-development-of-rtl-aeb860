// tb_line_buffer: load and shift test of one line buffer.
//
// A 10-pixel line buffer is loaded with a random row and shifted step by step, with
// random idle cycles in between; after k shifts the taps must be pixels k, k+1, k+2 of
// the row. A load during shifting must restart from the new row (load wins over shift).
module tb_line_buffer;
  import sobel_pkg::*;
  localparam int W = 10;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic load = 0, shift = 0;
  pixel_t [W-1:0] din;
  pixel_t tap0, tap1, tap2;
  pixel_t row [W];
  int checks = 0, failures = 0;

  line_buffer #(.IMG_W(W)) dut (.*);

  task automatic check_taps(input int k);
    checks++;
    if (tap0 != row[k] || tap1 != row[k+1] || tap2 != row[k+2]) begin
      failures++;
      $display("FAIL after %0d shifts: %h %h %h", k, tap0, tap1, tap2);
    end
  endtask

  initial begin
    repeat (20) begin
      for (int c = 0; c < W; c++) begin row[c] = pixel_t'($urandom); din[c] = row[c]; end
      @(negedge clk) load = 1; shift = $urandom_range(0, 1);   // load wins
      @(negedge clk) load = 0; shift = 0;
      din = '0;
      check_taps(0);
      for (int k = 1; k <= W-3; k++) begin
        if ($urandom_range(0, 3) == 0) @(negedge clk);   // idle cycle, taps held
        check_taps(k-1);
        shift = 1;
        @(negedge clk) shift = 0;
        check_taps(k);
      end
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
