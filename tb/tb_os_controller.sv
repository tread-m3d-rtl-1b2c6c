// tb_os_controller: checks the tile sequencer on its own (6 x 5 array, one
// link stage). For random tiles it records every output per cycle and checks:
// one clear cycle right after start; k_len consecutive IFMAP/Filter reads at
// base+0..k_len-1 starting the cycle after the clear; the wait before the
// drain (LINK + rows + cols - 1 cycles); ROWS drain cycles; OFMAP writes to
// of_base + ROWS-1-d for active rows only, highest row first; the row/column
// masks; and the total latency start -> done of
// k_len + act_rows + act_cols + ROWS + 2*LINK + 1 cycles. A start issued
// while busy must be ignored. Chained chunks are checked too: acc_first = 0
// must suppress the clear, acc_last = 0 must suppress drain and writes and
// end the chunk after k_len + act_rows + act_cols + LINK + 1 cycles.
module tb_os_controller;
  import tread_pkg::*;
  localparam int ROWS = 6, COLS = 5, IF_AW = 6, FL_AW = 6, OF_AW = 4, LINK = 1;
  localparam int KW = IF_AW + 1, RW = $clog2(ROWS + 1), CW = $clog2(COLS + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  logic [KW-1:0] k_len;
  logic [RW-1:0] act_rows;
  logic [CW-1:0] act_cols;
  logic [IF_AW-1:0] if_base, if_rd_addr;
  logic [FL_AW-1:0] fl_base, fl_rd_addr;
  logic [OF_AW-1:0] of_base, of_wr_addr;
  logic acc_first, acc_last;
  logic if_rd_en, fl_rd_en, pe_clear, pe_drain, of_wr_en;
  logic [ROWS-1:0] row_en;
  logic [COLS-1:0] col_en;

  int checks = 0, failures = 0;

  os_controller #(.ROWS(ROWS), .COLS(COLS), .IF_AW(IF_AW), .FL_AW(FL_AW),
                  .OF_AW(OF_AW), .LINK(LINK)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run_tile(input int K, input int ar, input int ac,
                          input bit first = 1, input bit last = 1);
    int t, n_rd, n_clear, n_drain, n_wr, first_rd, first_drain, exp_lat;
    int ib, fb, ob;
    ib = $urandom_range(0, 63); fb = $urandom_range(0, 63); ob = $urandom_range(0, 15);
    k_len = KW'(K); act_rows = RW'(ar); act_cols = CW'(ac);
    if_base = IF_AW'(ib); fl_base = FL_AW'(fb); of_base = OF_AW'(ob);
    acc_first = first; acc_last = last;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    acc_first = !first; acc_last = !last;
    // change inputs: they must have been captured
    k_len = '0; if_base = '0; fl_base = '0; of_base = '0;
    t = 1; n_rd = 0; n_clear = 0; n_drain = 0; n_wr = 0; first_rd = -1; first_drain = -1;
    exp_lat = last ? K + ar + ac + ROWS + 2 * LINK + 1 : K + ar + ac + LINK + 1;
    while (!done && t < 1000) begin
      chk(busy, "busy during tile");
      if (t == 3) begin start = 1; act_rows = '0; end   // must be ignored
      if (t == 4) start = 0;
      if (pe_clear) begin n_clear++; chk(t == 1, "clear cycle"); end
      chk(if_rd_en == fl_rd_en, "reads paired");
      if (if_rd_en) begin
        if (first_rd < 0) first_rd = t;
        chk(if_rd_addr == IF_AW'(ib + n_rd) && fl_rd_addr == FL_AW'(fb + n_rd), "read address");
        chk(t == first_rd + n_rd, "reads consecutive");
        n_rd++;
      end
      if (pe_drain) begin
        if (first_drain < 0) first_drain = t;
        if (of_wr_en) begin
          chk(of_wr_addr == OF_AW'(ob + ROWS - 1 - n_drain), "ofmap address");
          chk(ROWS - 1 - n_drain < ar, "write of active row only");
          n_wr++;
        end
        n_drain++;
      end else chk(!of_wr_en, "write only in drain");
      for (int r = 0; r < ROWS; r++) chk(row_en[r] == (r < ar), "row mask");
      for (int c = 0; c < COLS; c++) chk(col_en[c] == (c < ac), "col mask");
      @(posedge clk); #1;
      t++;
    end
    chk(t == exp_lat, "tile latency");
    if (t != exp_lat) $display("latency %0d expected %0d", t, exp_lat);
    chk(n_clear == (first ? 1 : 0), "clear only on first chunk");
    chk(n_rd == K, "k reads");
    chk(first_rd == 2, "first read after clear");
    if (last) begin
      chk(first_drain == 2 + K + LINK + ar + ac - 1, "drain start");
      chk(n_drain == ROWS, "drain length");
      chk(n_wr == ar, "writes per tile");
    end else begin
      chk(n_drain == 0 && n_wr == 0, "no drain before last chunk");
    end
    @(posedge clk); #1;
    chk(!busy && !done, "idle after done");
  endtask

  initial begin
    start = 0; acc_first = 1; acc_last = 1; k_len = '0; act_rows = '0; act_cols = '0;
    if_base = '0; fl_base = '0; of_base = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_tile(5, ROWS, COLS);
    run_tile(1, 1, 1);
    run_tile(64, 3, 4);
    run_tile(10, 4, 3, 1, 0);
    run_tile(7, 4, 3, 0, 0);
    run_tile(9, 4, 3, 0, 1);
    for (int i = 0; i < 20; i++)
      run_tile($urandom_range(1, 40), $urandom_range(1, ROWS), $urandom_range(1, COLS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
