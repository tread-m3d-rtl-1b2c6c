// tb_dqn_inference: runs a complete DQN inference (Atari deep Q-network) on
// the accelerator at its default size (64 x 54 array, 256/256/8 KB SRAMs).
//
// Network (84x84x4 input): conv 32 @ 8x8 stride 4 -> 20x20x32,
// conv 64 @ 4x4 stride 2 -> 9x9x64, conv 64 @ 3x3 stride 1 -> 7x7x64,
// fully connected 3136 -> 512, fully connected 512 -> 18. A fully connected
// layer is run as a convolution whose kernel covers its whole input.
//
// The testbench plays the host: for every tile of up to 64 output pixels x 54
// filters it writes the im2col operand words through the DRAM-side ports,
// starts the tile, reads the OFMAP words back and applies ReLU before the
// next layer (ReLU is not part of the accelerator). Every output is compared
// with a direct convolution computed here from the same int8 activations
// (shift right by the layer's shift, saturate to int8). Each tile's latency
// is checked against k + rows + cols + ROWS + 2*LINK + 1 cycles. Operand
// values are random: input activations 0..127, weights -16..15.
module tb_dqn_inference;
  import tread_pkg::*;
  localparam int ROWS = 64, COLS = 54;
  localparam int IF_WB = pow2_ceil(ROWS), FL_WB = pow2_ceil(COLS), OF_WB = pow2_ceil(COLS);
  localparam int IF_AW = clog2_min1(256 * 1024 / IF_WB), FL_AW = clog2_min1(256 * 1024 / FL_WB);
  localparam int OF_AW = clog2_min1(8 * 1024 / OF_WB);
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

  int checks = 0, failures = 0, n_tiles = 0;
  longint busy_cycles = 0;

  int act0 [], act1 [], act2 [], act3 [], act4 [], act5 [];
  int w1 [], w2 [], w3 [], w4 [], w5 [];

  initial begin
    repeat (2000000) @(posedge clk);
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

  // One layer: H x W x C input, KS x KS kernel, stride S, F filters.
  task automatic run_layer(input string name, input int H, input int W, input int C,
                           input int KS, input int S, input int F, input int SH,
                           input bit relu, ref int in_act[], ref int wts[], ref int out_act[]);
    int OH, OW, P, K, ar, ac, lat, exp_lat, mism;
    OH = (H - KS) / S + 1; OW = (W - KS) / S + 1; P = OH * OW; K = KS * KS * C;
    out_act = new[P * F];
    mism = 0;
    for (int pb = 0; pb < P; pb += ROWS) begin
      ar = (P - pb < ROWS) ? P - pb : ROWS;
      for (int fb = 0; fb < F; fb += COLS) begin
        ac = (F - fb < COLS) ? F - fb : COLS;
        // operand words: word k = reduction index (ky, kx, ch)
        for (int k = 0; k < K; k++) begin
          int ky, kx, ch;
          ky = k / (KS * C); kx = (k / C) % KS; ch = k % C;
          ifd_en = 1; ifd_we = 1; ifd_addr = IF_AW'(k); ifd_wdata = '0;
          fld_en = 1; fld_we = 1; fld_addr = FL_AW'(k); fld_wdata = '0;
          for (int r = 0; r < ar; r++) begin
            int p, oy, ox;
            p = pb + r; oy = p / OW; ox = p % OW;
            ifd_wdata[r*8 +: 8] = 8'(in_act[((oy * S + ky) * W + (ox * S + kx)) * C + ch]);
          end
          for (int c = 0; c < ac; c++) fld_wdata[c*8 +: 8] = 8'(wts[(fb + c) * K + k]);
          @(posedge clk); #1;
        end
        ifd_en = 0; fld_en = 0; ifd_we = 0; fld_we = 0;
        k_len = KW'(K); act_rows = RW'(ar); act_cols = CW'(ac);
        if_base = '0; fl_base = '0; of_base = '0; out_shift = 5'(SH);
        acc_first = 1; acc_last = 1;
        start = 1;
        @(posedge clk); #1;
        start = 0;
        lat = 1;
        while (!done) begin @(posedge clk); #1; lat++; end
        exp_lat = K + ar + ac + ROWS + 2 * LINK + 1;
        chk(lat == exp_lat, "tile latency");
        busy_cycles += lat;
        n_tiles++;
        // read results and compare with a direct convolution
        for (int r = 0; r < ar; r++) begin
          int p, oy, ox;
          p = pb + r; oy = p / OW; ox = p % OW;
          ofd_en = 1; ofd_we = 0; ofd_addr = OF_AW'(r);
          @(posedge clk); #1;
          ofd_en = 0;
          for (int c = 0; c < ac; c++) begin
            longint s;
            int f, hw, gold;
            f = fb + c;
            s = 0;
            for (int ky = 0; ky < KS; ky++)
              for (int kx = 0; kx < KS; kx++)
                for (int ch = 0; ch < C; ch++)
                  s += longint'(in_act[((oy * S + ky) * W + (ox * S + kx)) * C + ch]) *
                       longint'(wts[f * K + (ky * KS + kx) * C + ch]);
            gold = sat8(s >>> SH);
            hw = int'($signed(ofd_rdata[c*8 +: 8]));
            checks++;
            if (hw != gold) begin failures++; mism++; end
            out_act[p * F + f] = (relu && hw < 0) ? 0 : hw;
          end
        end
      end
    end
    $display("%s: %0d x %0d x %0d -> %0d x %0d x %0d, K=%0d, mismatches %0d",
             name, H, W, C, OH, OW, F, K, mism);
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
    act0 = new[84 * 84 * 4];
    foreach (act0[i]) act0[i] = $urandom_range(0, 127);
    rand_weights(w1, 32 * 8 * 8 * 4);
    rand_weights(w2, 64 * 4 * 4 * 32);
    rand_weights(w3, 64 * 3 * 3 * 64);
    rand_weights(w4, 512 * 7 * 7 * 64);
    rand_weights(w5, 18 * 512);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_layer("conv1", 84, 84, 4, 8, 4, 32, 9, 1, act0, w1, act1);
    run_layer("conv2", 20, 20, 32, 4, 2, 64, 9, 1, act1, w2, act2);
    run_layer("conv3", 9, 9, 64, 3, 1, 64, 9, 1, act2, w3, act3);
    run_layer("fc4", 7, 7, 64, 7, 1, 512, 10, 1, act3, w4, act4);
    run_layer("fc5", 1, 1, 512, 1, 1, 18, 9, 0, act4, w5, act5);
    $display("DQN: %0d tiles, %0d accelerator busy cycles", n_tiles, busy_cycles);
    chk(n_tiles == 7 + 4 + 2 + 10 + 1, "tile count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
