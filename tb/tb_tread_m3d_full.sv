// tb_tread_m3d_full: end-to-end test of the accelerator at the default size (64 x 54 array, 256/256/8 KB SRAMs, Partition B-wordline).
// Operand words are written into the IFMAP and Filter SRAMs through their
// DRAM-side ports, tiles are started, and the OFMAP words read back through
// the OFMAP DRAM-side port are compared with an integer matrix product
// computed here (sum over k of A[k][r] * B[k][c], arithmetic shift right by
// out_shift, saturated to int8). It also checks the tile latency
// (k + rows + cols + ROWS + 2*LINK + 1 cycles), that unused columns read back
// as zero, and counts the mechanisms the design has: full-array tiles, tiles
// with idle PEs, saturated results (against the ofmap_sat pulses), DRAM-side
// transfers that overlap a running tile, back-to-back tiles, and a long
// reduction run as a chain of chunks accumulating in place. A mechanism
// never exercised counts as a failure.
module tb_tread_m3d_full;
  import tread_pkg::*;
  localparam int ROWS = 64, COLS = 54, IF_KB = 256, FL_KB = 256, OF_KB = 8;
  localparam int IF_WB = pow2_ceil(ROWS), FL_WB = pow2_ceil(COLS), OF_WB = pow2_ceil(COLS);
  localparam int IF_D = IF_KB * 1024 / IF_WB, FL_D = FL_KB * 1024 / FL_WB, OF_D = OF_KB * 1024 / OF_WB;
  localparam int IF_AW = clog2_min1(IF_D), FL_AW = clog2_min1(FL_D), OF_AW = clog2_min1(OF_D);
  localparam int KW = IF_AW + 1, RW = $clog2(ROWS + 1), CW = $clog2(COLS + 1);
  localparam int LINK = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, ofmap_sat;
  logic [KW-1:0] k_len;
  logic [RW-1:0] act_rows;
  logic [CW-1:0] act_cols;
  logic [IF_AW-1:0] if_base;
  logic [FL_AW-1:0] fl_base;
  logic [OF_AW-1:0] of_base;
  logic [4:0] out_shift;
  logic acc_first, acc_last;
  logic ifd_en, ifd_we, ifd_rvalid, fld_en, fld_we, fld_rvalid, ofd_en, ofd_we, ofd_rvalid;
  logic [IF_AW-1:0] ifd_addr;
  logic [FL_AW-1:0] fld_addr;
  logic [OF_AW-1:0] ofd_addr;
  logic [IF_WB*8-1:0] ifd_wdata, ifd_rdata;
  logic [FL_WB*8-1:0] fld_wdata, fld_rdata;
  logic [OF_WB*8-1:0] ofd_wdata, ofd_rdata;

  tread_m3d_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_full = 0, n_idle = 0, n_sat_ref = 0, n_sat_hw = 0, n_overlap = 0, n_b2b = 0, n_tiles = 0, n_chain = 0;
  logic signed [7:0] memA [IF_D][ROWS];
  logic signed [7:0] memB [FL_D][COLS];
  logic [7:0] expect_w [OF_D][OF_WB];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ofmap_sat) n_sat_hw++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // Write K operand words at base through the DRAM-side ports; `big` makes
  // operands large so that results clip.
  task automatic fill(input int ib, input int fb, input int K, input bit big);
    for (int k = 0; k < K; k++) begin
      ifd_en = 1; ifd_we = 1; ifd_addr = IF_AW'(ib + k);
      fld_en = 1; fld_we = 1; fld_addr = FL_AW'(fb + k);
      for (int r = 0; r < IF_WB; r++) begin
        logic signed [7:0] v;
        v = big ? 8'sd127 - 8'($urandom_range(0, 3)) : 8'($urandom);
        ifd_wdata[r*8 +: 8] = v;
        if (r < ROWS) memA[(ib + k) % IF_D][r] = v;
      end
      for (int c = 0; c < FL_WB; c++) begin
        logic signed [7:0] v;
        v = big ? ((c % 2) ? -8'sd128 : 8'sd127) : 8'($urandom);
        fld_wdata[c*8 +: 8] = v;
        if (c < COLS) memB[(fb + k) % FL_D][c] = v;
      end
      @(posedge clk); #1;
      if (busy) n_overlap++;
    end
    ifd_en = 0; fld_en = 0; ifd_we = 0; fld_we = 0;
  endtask

  task automatic reference(input int ib, input int fb, input int ob, input int K,
                           input int ar, input int ac, input int sh);
    for (int r = 0; r < ar; r++) begin
      bit clipped = 0;
      for (int c = 0; c < OF_WB; c++) begin
        longint s = 0;
        if (c < ac)
          for (int k = 0; k < K; k++)
            s += longint'(memA[(ib + k) % IF_D][r]) * longint'(memB[(fb + k) % FL_D][c]);
        s = s >>> sh;
        if (s > 127) begin s = 127; clipped = 1; end
        if (s < -128) begin s = -128; clipped = 1; end
        expect_w[(ob + r) % OF_D][c] = 8'(s);
      end
      if (clipped) n_sat_ref++;
    end
  endtask

  task automatic readback(input int ob, input int ar);
    for (int r = 0; r < ar; r++) begin
      ofd_en = 1; ofd_we = 0; ofd_addr = OF_AW'(ob + r);
      @(posedge clk); #1;
      ofd_en = 0;
      chk(ofd_rvalid, "ofmap read valid");
      for (int c = 0; c < OF_WB; c++) begin
        chk(ofd_rdata[c*8 +: 8] == expect_w[(ob + r) % OF_D][c], "ofmap byte");
        if (ofd_rdata[c*8 +: 8] != expect_w[(ob + r) % OF_D][c] && failures < 10)
          $display("  row %0d col %0d got %0d exp %0d", r, c,
                   $signed(ofd_rdata[c*8 +: 8]), $signed(expect_w[(ob + r) % OF_D][c]));
      end
    end
  endtask

  // Start a tile and wait for done; in parallel optionally fill the operands
  // of the next tile (overlap with DRAM traffic).
  task automatic run_tile(input int ib, input int fb, input int ob, input int K,
                          input int ar, input int ac, input int sh,
                          input bit prefill, input int nib, input int nfb, input int nK,
                          input bit nbig, input bit first = 1, input bit last = 1);
    int lat, exp_lat;
    k_len = KW'(K); act_rows = RW'(ar); act_cols = CW'(ac);
    if_base = IF_AW'(ib); fl_base = FL_AW'(fb); of_base = OF_AW'(ob); out_shift = 5'(sh);
    acc_first = first; acc_last = last;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    lat = 1;
    exp_lat = last ? K + ar + ac + ROWS + 2 * LINK + 1 : K + ar + ac + LINK + 1;
    fork
      begin
        while (!done) begin @(posedge clk); #1; lat++; end
      end
      begin
        if (prefill) fill(nib, nfb, nK, nbig);
      end
    join
    chk(lat == exp_lat, "tile latency");
    if (lat != exp_lat) $display("latency %0d expected %0d", lat, exp_lat);
    n_tiles++;
    if (ar == ROWS && ac == COLS) n_full++; else n_idle++;
    if (!(first && last)) n_chain++;
  endtask

  initial begin
    int K1, K2, K3;
    start = 0; k_len = '0; act_rows = '0; act_cols = '0; if_base = '0; fl_base = '0;
    of_base = '0; out_shift = '0; acc_first = 1; acc_last = 1;
    ifd_en = 0; ifd_we = 0; ifd_addr = '0; ifd_wdata = '0;
    fld_en = 0; fld_we = 0; fld_addr = '0; fld_wdata = '0;
    ofd_en = 0; ofd_we = 0; ofd_addr = '0; ofd_wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    K1 = 24; K2 = 40; K3 = 16;
    // tile 1: whole array; its operands are loaded first
    fill(0, 0, K1, 0);
    // tile 1 runs while tile 2's operands stream in (overlap)
    reference(0, 0, 0, K1, ROWS, COLS, 8);
    run_tile(0, 0, 0, K1, ROWS, COLS, 8, 1, K1, K1, K2, 0);
    readback(0, ROWS);
    // tile 2 back to back with tile 3: partial array (idle PEs), tile 3's
    // large operands are filled during tile 2
    reference(K1, K1, ROWS, K2, ROWS / 2 + 1, COLS - 2, 8);
    run_tile(K1, K1, ROWS, K2, ROWS / 2 + 1, COLS - 2, 8, 1, K1 + K2, K1 + K2, K3, 1);
    n_b2b++;
    // tile 3: saturating results, no shift
    reference(K1 + K2, K1 + K2, 0, K3, ROWS, COLS, 0);
    run_tile(K1 + K2, K1 + K2, 0, K3, ROWS, COLS, 0, 0, 0, 0, 0, 0);
    readback(ROWS, ROWS / 2 + 1);
    readback(0, ROWS);
    // tile 4: a single row and column
    reference(3, 5, 1, 2, 1, 1, 0);
    run_tile(3, 5, 1, 2, 1, 1, 0, 0, 0, 0, 0, 0);
    readback(1, 1);
    // tile 5: one reduction of K1 + K2 steps run as two chained chunks
    reference(0, 0, 2, K1 + K2, ROWS, COLS - 1, 9);
    run_tile(0, 0, 2, K1, ROWS, COLS - 1, 9, 0, 0, 0, 0, 0, 1, 0);
    run_tile(K1, K1, 2, K2, ROWS, COLS - 1, 9, 0, 0, 0, 0, 0, 0, 1);
    readback(2, ROWS);
    chk(n_sat_hw == n_sat_ref, "saturation flags");
    if (n_sat_hw != n_sat_ref) $display("sat hw %0d ref %0d", n_sat_hw, n_sat_ref);
    $display("mechanisms: full=%0d idle_pe=%0d saturated=%0d overlap=%0d back_to_back=%0d chained=%0d tiles=%0d",
             n_full, n_idle, n_sat_ref, n_overlap, n_b2b, n_chain, n_tiles);
    chk(n_chain > 0, "chained reduction happened");
    chk(n_full > 0, "full-array tile happened");
    chk(n_idle > 0, "idle-PE tile happened");
    chk(n_sat_ref > 0, "saturation happened");
    chk(n_overlap > 0, "DRAM overlap happened");
    chk(n_b2b > 0, "back-to-back tiles happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
