// tb_clock_gate: checks the clock gate against an independent model.
//
// The enable is changed at random points of the clock period, including while clk is
// high. Expected behaviour: gclk follows clk on the cycles whose enable was 1 at the
// rising edge of clk, stays low on the others, and never changes while clk is high
// except falling with clk. gclk is sampled every 2 time units between clock edges; each sample is one check.
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int n_pass = 0, n_block = 0, n_mid_toggle = 0;
  logic cycle_en;   // enable seen at the last rising edge of clk

  clock_gate dut (.clk, .en, .gclk);

  // period 20: clk high for t in [0,10), low for [10,20) of each period
  initial forever begin
    clk = 1'b1; #10; clk = 1'b0; #10;
  end

  always @(posedge clk) begin
    cycle_en = en;
    if (en) n_pass++; else n_block++;
  end

  // Random enable changes: half in the low phase, half in the high phase.
  // Changes happen at odd times only, so never together with a clock edge.
  initial begin
    #1;
    repeat (2000) begin
      #(2 * $urandom_range(1, 9));
      if (clk) n_mid_toggle++;
      en = 1'($urandom_range(0, 1));
    end
  end

  // Samples at even times that are not clock edges.
  initial begin
    repeat (20000) begin
      #2;
      if ($time % 10 == 0) continue;
      checks++;
      if (gclk !== (clk & cycle_en)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0t clk=%b en=%b gclk=%b", $time, clk, en, gclk);
      end
    end
    checks++; if (n_pass == 0 || n_block == 0 || n_mid_toggle == 0) failures++;
    $display("cycles passed %0d, blocked %0d, enable changes while clk high %0d",
             n_pass, n_block, n_mid_toggle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
