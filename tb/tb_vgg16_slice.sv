// tb_vgg16_slice: runs the parts of VGG16 whose reductions are longer than the
// operand SRAMs hold, on the accelerator at its default size.
//
// The 256 KB IFMAP and Filter SRAMs hold 4096 reduction steps of 64-byte
// words. conv5_1 (14x14x512 input, 3x3 kernel, padding 1, 512 filters) needs
// K = 4608 and fc6 (7x7x512 -> 4096) needs K = 25088, so every tile is run as
// a chain of chunks of at most 4096 steps: the first chunk clears the
// accumulators, the last one drains them, and the testbench (acting as the
// host) refills the SRAMs between chunks. A whole layer is too long to
// simulate here, so a slice is run: 2 x 2 tiles (128 output pixels x 108
// filters) of conv5_1 and one tile (54 outputs) of fc6. Results are compared
// with a direct convolution computed here; each chunk's latency is checked
// (non-final: k + rows + cols + LINK + 1, final: k + rows + cols + ROWS +
// 2*LINK + 1 cycles). Random data: activations 0..127, weights -16..15.
module tb_vgg16_slice;
  import tread_pkg::*;
  localparam int ROWS = 64, COLS = 54;
  localparam int IF_WB = pow2_ceil(ROWS), FL_WB = pow2_ceil(COLS), OF_WB = pow2_ceil(COLS);
  localparam int IF_AW = clog2_min1(256 * 1024 / IF_WB), FL_AW = clog2_min1(256 * 1024 / FL_WB);
  localparam int OF_AW = clog2_min1(8 * 1024 / OF_WB);
  localparam int KW = IF_AW + 1, RW = $clog2(ROWS + 1), CW = $clog2(COLS + 1);
  localparam int LINK = 1;
  localparam int CHUNK = 1 << IF_AW;

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

  int checks = 0, failures = 0, n_tiles = 0, n_chunks = 0;
  longint busy_cycles = 0;

  int a5 [], a6 [];
  int w5 [], w6 [];

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int sat8(input longint v);
    if (v > 127) return 127;
    if (v < -128) return -128;
    return int'(v);
  endfunction

  // Slice of one layer: H x W x C input, KS x KS kernel, stride S, zero
  // padding PAD, F filters; at most NPT pixel tiles and NFT filter tiles.
  task automatic run_slice(input string name, input int H, input int W, input int C,
                           input int KS, input int S, input int PAD, input int F,
                           input int SH, input int NPT, input int NFT,
                           ref int in_act[], ref int wts[]);
    int OH, OW, P, K, ar, ac, lat, exp_lat, mism, nchunk, pt, ft;
    OH = (H + 2 * PAD - KS) / S + 1; OW = (W + 2 * PAD - KS) / S + 1;
    P = OH * OW; K = KS * KS * C;
    mism = 0; nchunk = 0; pt = 0;
    for (int pb = 0; pb < P && pt < NPT; pb += ROWS, pt++) begin
      ar = (P - pb < ROWS) ? P - pb : ROWS;
      ft = 0;
      for (int fb = 0; fb < F && ft < NFT; fb += COLS, ft++) begin
        ac = (F - fb < COLS) ? F - fb : COLS;
        for (int k0 = 0; k0 < K; k0 += CHUNK) begin
          int klen;
          klen = (K - k0 < CHUNK) ? K - k0 : CHUNK;
          for (int kk = 0; kk < klen; kk++) begin
            int k, ky, kx, ch;
            k = k0 + kk;
            ky = k / (KS * C); kx = (k / C) % KS; ch = k % C;
            ifd_en = 1; ifd_we = 1; ifd_addr = IF_AW'(kk); ifd_wdata = '0;
            fld_en = 1; fld_we = 1; fld_addr = FL_AW'(kk); fld_wdata = '0;
            for (int r = 0; r < ar; r++) begin
              int p, iy, ix;
              p = pb + r;
              iy = (p / OW) * S + ky - PAD; ix = (p % OW) * S + kx - PAD;
              if (iy >= 0 && iy < H && ix >= 0 && ix < W)
                ifd_wdata[r*8 +: 8] = 8'(in_act[(iy * W + ix) * C + ch]);
            end
            for (int c = 0; c < ac; c++) fld_wdata[c*8 +: 8] = 8'(wts[(fb + c) * K + k]);
            @(posedge clk); #1;
          end
          ifd_en = 0; fld_en = 0; ifd_we = 0; fld_we = 0;
          k_len = KW'(klen); act_rows = RW'(ar); act_cols = CW'(ac);
          if_base = '0; fl_base = '0; of_base = '0; out_shift = 5'(SH);
          acc_first = (k0 == 0); acc_last = (k0 + klen == K);
          start = 1;
          @(posedge clk); #1;
          start = 0;
          lat = 1;
          while (!done) begin @(posedge clk); #1; lat++; end
          exp_lat = acc_last ? klen + ar + ac + ROWS + 2 * LINK + 1 : klen + ar + ac + LINK + 1;
          chk(lat == exp_lat, "chunk latency");
          busy_cycles += lat;
          nchunk++;
        end
        n_tiles++;
        for (int r = 0; r < ar; r++) begin
          int p;
          p = pb + r;
          ofd_en = 1; ofd_we = 0; ofd_addr = OF_AW'(r);
          @(posedge clk); #1;
          ofd_en = 0;
          for (int c = 0; c < ac; c++) begin
            longint s;
            int f, hw, gold;
            f = fb + c;
            s = 0;
            for (int ky = 0; ky < KS; ky++)
              for (int kx = 0; kx < KS; kx++) begin
                int iy, ix;
                iy = (p / OW) * S + ky - PAD; ix = (p % OW) * S + kx - PAD;
                if (iy >= 0 && iy < H && ix >= 0 && ix < W)
                  for (int ch = 0; ch < C; ch++)
                    s += longint'(in_act[(iy * W + ix) * C + ch]) *
                         longint'(wts[f * K + (ky * KS + kx) * C + ch]);
              end
            gold = sat8(s >>> SH);
            hw = int'($signed(ofd_rdata[c*8 +: 8]));
            checks++;
            if (hw != gold) begin failures++; mism++; end
          end
        end
      end
    end
    n_chunks += nchunk;
    $display("%s: K=%0d in chunks of <= %0d, %0d chunks, mismatches %0d", name, K, CHUNK, nchunk, mism);
  endtask

  task automatic rand_weights(ref int w[], input int n);
    w = new[n];
    foreach (w[i]) w[i] = $signed($urandom_range(0, 31)) - 16;
  endtask

  initial begin
    start = 0; k_len = '0; act_rows = '0; act_cols = '0; if_base = '0; fl_base = '0;
    of_base = '0; out_shift = '0; acc_first = 1; acc_last = 1;
    ifd_en = 0; ifd_we = 0; ifd_addr = '0; ifd_wdata = '0;
    fld_en = 0; fld_we = 0; fld_addr = '0; fld_wdata = '0;
    ofd_en = 0; ofd_we = 0; ofd_addr = '0; ofd_wdata = '0;
    a5 = new[14 * 14 * 512];
    foreach (a5[i]) a5[i] = $urandom_range(0, 127);
    a6 = new[7 * 7 * 512];
    foreach (a6[i]) a6[i] = $urandom_range(0, 127);
    rand_weights(w5, 108 * 3 * 3 * 512);
    rand_weights(w6, 54 * 7 * 7 * 512);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_slice("conv5_1", 14, 14, 512, 3, 1, 1, 108, 10, 2, 2, a5, w5);
    run_slice("fc6", 7, 7, 512, 7, 1, 0, 54, 11, 1, 1, a6, w6);
    $display("VGG16 slice: %0d tiles, %0d chunks, %0d accelerator busy cycles", n_tiles, n_chunks, busy_cycles);
    chk(n_tiles == 5 && n_chunks == 4 * 2 + 7, "tile and chunk count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
