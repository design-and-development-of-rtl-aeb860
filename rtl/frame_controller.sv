// frame_controller: walks the 3x3 window over the whole frame.
//
// For each row triple r..r+2, r = 0 .. cfg_h-3, the controller spends
//   READ  1 cycle          rd_en: the memory returns rows r, r+1, r+2
//   LOAD  1 cycle          lb_load: the three rows are copied into the line buffers
//   SHIFT cfg_w-2 cycles   lb_shift: one window per cycle, columns c = 0 .. cfg_w-3
// so a frame takes (cfg_h-2)*cfg_w cycles and yields (cfg_h-2)*(cfg_w-2) windows, in
// the order rows r(0)-r(2) over all columns, then r(1)-r(3), and so on. row and col give
// the window's top-left pixel during SHIFT. done pulses with the last shift; busy is
// high from the cycle after start until that last shift.
//
// start is taken only when idle; cfg_w and cfg_h (active image size, 3..IMG_W and
// 3..IMG_H) are sampled then. The controller also drives the enables of the three clock
// gates: the memory clock runs on reads and writes, the window clock on load and shift
// cycles plus one cycle to clear its valid flag, and the Sobel clock while windows are
// in its two-stage pipeline. Clocked by the free-running clock; rst_n asynchronous,
// active low. The scan order follows the design description; the cycle schedule is
// this design's choice.
module frame_controller #(
  parameter int unsigned IMG_W = 128,
  parameter int unsigned IMG_H = 128,
  localparam int unsigned RW  = (IMG_H > 1) ? $clog2(IMG_H) : 1,
  localparam int unsigned CW  = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int unsigned RW1 = $clog2(IMG_H + 1),
  localparam int unsigned CW1 = $clog2(IMG_W + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [CW1-1:0] cfg_w,
  input  logic [RW1-1:0] cfg_h,
  input  logic           wr_en,       // pixel write request, for the memory clock gate
  output logic           rd_en,
  output logic [RW-1:0]  rd_row,
  output logic           lb_load,
  output logic           lb_shift,
  output logic [RW-1:0]  row,
  output logic [CW-1:0]  col,
  output logic           busy,
  output logic           done,
  output logic           mem_clk_en,
  output logic           win_clk_en,
  output logic           sobel_clk_en
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_LOAD, S_SHIFT} state_t;

  state_t         state;
  logic [CW-1:0]  last_col;   // cfg_w - 3
  logic [RW-1:0]  last_row;   // cfg_h - 3
  logic [2:0]     pipe;       // shift history: window register and two Sobel stages

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      row      <= '0;
      col      <= '0;
      last_col <= '0;
      last_row <= '0;
      pipe     <= '0;
    end else begin
      pipe <= {pipe[1:0], lb_shift};
      unique case (state)
        S_IDLE: if (start) begin
          last_col <= CW'(cfg_w - 3);
          last_row <= RW'(cfg_h - 3);
          row      <= '0;
          col      <= '0;
          state    <= S_READ;
        end
        S_READ: state <= S_LOAD;
        S_LOAD: begin
          col   <= '0;
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          if (col == last_col) begin
            if (row == last_row) state <= S_IDLE;
            else begin
              row   <= row + 1'b1;
              state <= S_READ;
            end
          end else begin
            col <= col + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rd_en        = (state == S_READ);
    rd_row       = row;
    lb_load      = (state == S_LOAD);
    lb_shift     = (state == S_SHIFT);
    busy         = (state != S_IDLE);
    done         = (state == S_SHIFT) && (col == last_col) && (row == last_row);
    mem_clk_en   = rd_en || wr_en;
    win_clk_en   = lb_load || lb_shift || pipe[0];
    sobel_clk_en = |pipe;
  end

`ifndef SYNTHESIS
  // A frame needs at least one full 3x3 window and must fit in the memory.
  assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && start) |-> (cfg_w >= 3 && 32'(cfg_w) <= IMG_W && cfg_h >= 3 && 32'(cfg_h) <= IMG_H))
    else $error("frame_controller: image size %0dx%0d out of range", cfg_w, cfg_h);
`endif
endmodule
