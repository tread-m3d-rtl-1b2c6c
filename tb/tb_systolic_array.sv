// tb_systolic_array: drives a 4 x 5 array directly with pre-skewed operands
// and checks the output-stationary matrix product it drains at the bottom
// edge. Lane r of the left edge carries A[k][r] at cycle k + r, lane c of the
// top edge carries B[k][c] at cycle k + c; PE(r,c) must hold sum_k A*B. The
// drain starts on the first cycle after PE(R-1,C-1) received its last pair
// (K + R + C - 2 cycles after the first feed), which checks the wavefront
// timing. A second tile uses only a 3 x 2 active region and checks that the
// idle PEs keep zero.
module tb_systolic_array;
  import tread_pkg::*;
  localparam int R = 4, C = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [R-1:0] row_en, a_left_vld;
  logic [C-1:0] col_en, b_top_vld;
  logic pe_clear, pe_drain;
  data_t a_left [R];
  data_t b_top  [C];
  acc_t  psum_bot [C];

  int checks = 0, failures = 0;
  int A [64][R];
  int B [64][C];
  longint ref_c [R][C];

  systolic_array #(.ROWS(R), .COLS(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_tile(input int K, input int ar, input int ac);
    for (int r = 0; r < R; r++) row_en[r] = (r < ar);
    for (int c = 0; c < C; c++) col_en[c] = (c < ac);
    for (int k = 0; k < K; k++) begin
      for (int r = 0; r < R; r++) A[k][r] = $signed($urandom_range(0, 255)) - 128;
      for (int c = 0; c < C; c++) B[k][c] = $signed($urandom_range(0, 255)) - 128;
    end
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        ref_c[r][c] = 0;
        if (r < ar && c < ac)
          for (int k = 0; k < K; k++) ref_c[r][c] += longint'(A[k][r] * B[k][c]);
      end
    pe_clear = 1; @(posedge clk); #1; pe_clear = 0;
    for (int t = 0; t < K + R + C - 2; t++) begin
      for (int r = 0; r < R; r++) begin
        a_left_vld[r] = (t - r >= 0 && t - r < K);
        a_left[r] = a_left_vld[r] ? data_t'(A[t-r][r]) : data_t'($urandom);
      end
      for (int c = 0; c < C; c++) begin
        b_top_vld[c] = (t - c >= 0 && t - c < K);
        b_top[c] = b_top_vld[c] ? data_t'(B[t-c][c]) : data_t'($urandom);
      end
      @(posedge clk); #1;
    end
    a_left_vld = '0; b_top_vld = '0;
    pe_drain = 1;
    for (int d = 0; d < R; d++) begin
      for (int c = 0; c < C; c++) begin
        checks++;
        if (psum_bot[c] != acc_t'(ref_c[R-1-d][c])) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d col %0d got %0d exp %0d", R-1-d, c, psum_bot[c], ref_c[R-1-d][c]);
        end
      end
      @(posedge clk); #1;
    end
    pe_drain = 0;
  endtask

  initial begin
    row_en = '0; col_en = '0; pe_clear = 0; pe_drain = 0;
    a_left_vld = '0; b_top_vld = '0;
    for (int r = 0; r < R; r++) a_left[r] = '0;
    for (int c = 0; c < C; c++) b_top[c] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_tile(7, R, C);
    run_tile(12, 3, 2);
    run_tile(1, R, C);
    run_tile(33, R, C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
