// systolic_array: ROWS x COLS grid of mac_pe processing elements.
//
// The left-edge PEs receive IFMAP operands (one lane per row), the top-edge
// PEs receive filter operands (one lane per column); inside the grid operands
// move one PE right (IFMAP) or down (filter) per cycle. With output-stationary
// dataflow PE(r,c) accumulates output pixel r of filter c. Results leave at
// the bottom edge: while pe_drain is high every column shifts its accumulators
// down one row per cycle, so psum_bot shows row ROWS-1 first, then ROWS-2, ...
// The top row shifts in zero.
//
// The active region of a tile is rows 0..n-1 and columns 0..m-1 (row_en /
// col_en masks); PEs outside it stay idle, as in the array utilisation picture
// of the accelerator. Operands fed to lane r must already be skewed by r
// cycles (lane c of the filter edge by c cycles), see skew_buffer.
//
// Grid, edge roles and right/down flow follow the document; skew handling,
// masks and drain-by-shifting are this design's choices.
module systolic_array
  import tread_pkg::*;
#(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 54
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ROWS-1:0]  row_en,
  input  logic [COLS-1:0]  col_en,
  input  logic             pe_clear,
  input  logic             pe_drain,
  input  data_t            a_left  [ROWS],
  input  logic [ROWS-1:0]  a_left_vld,
  input  data_t            b_top   [COLS],
  input  logic [COLS-1:0]  b_top_vld,
  output acc_t             psum_bot[COLS]
);

  // Operand and partial-sum nets between neighbouring PEs.
  data_t a_net  [ROWS][COLS+1];
  logic  av_net [ROWS][COLS+1];
  data_t b_net  [ROWS+1][COLS];
  logic  bv_net [ROWS+1][COLS];
  acc_t  p_net  [ROWS+1][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_left
    assign a_net[r][0]  = a_left[r];
    assign av_net[r][0] = a_left_vld[r];
  end

  for (genvar c = 0; c < COLS; c++) begin : g_top
    assign b_net[0][c]  = b_top[c];
    assign bv_net[0][c] = b_top_vld[c];
    assign p_net[0][c]  = '0;
    assign psum_bot[c]  = p_net[ROWS][c];
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      mac_pe u_pe (
        .clk      (clk),
        .rst_n    (rst_n),
        .en       (row_en[r] & col_en[c]),
        .clear    (pe_clear),
        .drain    (pe_drain),
        .a_in     (a_net[r][c]),
        .a_vld_in (av_net[r][c]),
        .b_in     (b_net[r][c]),
        .b_vld_in (bv_net[r][c]),
        .psum_in  (p_net[r][c]),
        .a_out    (a_net[r][c+1]),
        .a_vld_out(av_net[r][c+1]),
        .b_out    (b_net[r+1][c]),
        .b_vld_out(bv_net[r+1][c]),
        .psum_out (p_net[r+1][c])
      );
    end
  end

endmodule
