// tb_sram_tiered: checks the SRAM buffer in all three tier organisations
// (Partition A, B-wordline, B-bitline) against one reference memory. Random
// reads and writes are issued on both ports for 3000 cycles; read data must
// appear with rvalid one cycle after the request, and port A must win a
// same-address write collision. Small capacity (1 KB, 8-byte words).
module tb_sram_tiered;
  import tread_pkg::*;
  localparam int WB = 8, W = WB * 8, DEPTH = 1024 / WB, AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [W-1:0]  a_wdata, b_wdata;
  logic [W-1:0]  a_rd [3];
  logic [W-1:0]  b_rd [3];
  logic          a_rv [3];
  logic          b_rv [3];

  logic [W-1:0] model [DEPTH];
  logic [W-1:0] exp_a, exp_b;
  logic         exp_av, exp_bv;
  int checks = 0, failures = 0, collisions = 0;

  sram_tiered #(.CAP_KB(1), .WORD_BYTES(WB), .PARTITION(PART_A)) u_a (
    .clk, .rst_n, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata(a_rd[0]), .a_rvalid(a_rv[0]),
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata(b_rd[0]), .b_rvalid(b_rv[0]));
  sram_tiered #(.CAP_KB(1), .WORD_BYTES(WB), .PARTITION(PART_B_WORDLINE)) u_wl (
    .clk, .rst_n, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata(a_rd[1]), .a_rvalid(a_rv[1]),
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata(b_rd[1]), .b_rvalid(b_rv[1]));
  sram_tiered #(.CAP_KB(1), .WORD_BYTES(WB), .PARTITION(PART_B_BITLINE)) u_bl (
    .clk, .rst_n, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata(a_rd[2]), .a_rvalid(a_rv[2]),
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata(b_rd[2]), .b_rvalid(b_rv[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = '0; b_addr = '0;
    a_wdata = '0; b_wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // fill through port B so every word is known
    for (int i = 0; i < DEPTH; i++) begin
      b_en = 1; b_we = 1; b_addr = AW'(i); b_wdata = {$urandom, $urandom};
      model[i] = b_wdata;
      @(posedge clk); #1;
    end
    b_en = 0;
    for (int t = 0; t < 3000; t++) begin
      a_en = $urandom_range(0, 1); a_we = $urandom_range(0, 1);
      b_en = $urandom_range(0, 1); b_we = $urandom_range(0, 1);
      a_addr = AW'($urandom); b_addr = AW'($urandom);
      if ($urandom_range(0, 15) == 0) b_addr = a_addr;
      a_wdata = {$urandom, $urandom}; b_wdata = {$urandom, $urandom};
      exp_av = a_en && !a_we; exp_bv = b_en && !b_we;
      exp_a = model[a_addr]; exp_b = model[b_addr];
      if (b_en && b_we) model[b_addr] = b_wdata;
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) collisions++;
      @(posedge clk); #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (a_rv[p] != exp_av || b_rv[p] != exp_bv) failures++;
        if (exp_av) begin checks++; if (a_rd[p] != exp_a) failures++; end
        if (exp_bv) begin checks++; if (b_rd[p] != exp_b) failures++; end
      end
    end
    a_en = 0; b_en = 0;
    // read everything back through port A
    for (int i = 0; i < DEPTH; i++) begin
      a_en = 1; a_we = 0; a_addr = AW'(i);
      @(posedge clk); #1;
      for (int p = 0; p < 3; p++) begin
        checks++; if (a_rd[p] != model[i]) failures++;
      end
    end
    checks++; if (collisions == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
