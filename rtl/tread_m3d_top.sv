// tread_m3d_top: monolithic-3D output-stationary systolic DNN accelerator.
//
// A ROWS x COLS array of 8-bit MAC processing elements is fed from three SRAM
// buffers: the IFMAP SRAM drives the left edge (one byte per row), the Filter
// SRAM drives the top edge (one byte per column) and the bottom edge writes
// results to the OFMAP SRAM. Each SRAM port is sized to its edge rounded up to
// a power of two (64, 64 and 64 bytes for the default 64 x 54 array). Between
// every SRAM and the array sits one interconnect pipeline stage (edge_link),
// so SRAM access, wire and PE are separate pipeline stages; skew buffers turn
// each SRAM word into a diagonal wavefront. os_controller runs one tile per
// start command (see its header for phases and cycle count).
//
// Defaults are the generic accelerator selected for lowest system
// energy-delay-area product at 80 C: 64 x 54 array, IFMAP/Filter/OFMAP SRAMs of
// 256/256/8 KB, SRAMs partitioned across the two tiers along the wordlines,
// intended for 800 MHz. The tier folding of the array is physical only and
// does not change the RTL.
//
// External interface: a tile command (start, k_len, act_rows, act_cols, base
// addresses, out_shift, and acc_first/acc_last for chaining the chunks of a
// long reduction, all captured at start) with busy/done, and the DRAM-side
// port of each SRAM (one word per cycle, read data one cycle later) so that
// operand fills and result reads can proceed while a tile computes. ofmap_sat
// pulses when a written OFMAP word had a clipped result.
module tread_m3d_top
  import tread_pkg::*;
#(
  parameter int unsigned ROWS      = 64,
  parameter int unsigned COLS      = 54,
  parameter int unsigned IF_KB     = 256,
  parameter int unsigned FL_KB     = 256,
  parameter int unsigned OF_KB     = 8,
  parameter partition_e  PARTITION = PART_B_WORDLINE,
  parameter int unsigned LINK      = 1,
  parameter int unsigned IF_WB     = pow2_ceil(ROWS),
  parameter int unsigned FL_WB     = pow2_ceil(COLS),
  parameter int unsigned OF_WB     = pow2_ceil(COLS),
  parameter int unsigned IF_AW     = clog2_min1(IF_KB * 1024 / IF_WB),
  parameter int unsigned FL_AW     = clog2_min1(FL_KB * 1024 / FL_WB),
  parameter int unsigned OF_AW     = clog2_min1(OF_KB * 1024 / OF_WB),
  parameter int unsigned KW        = IF_AW + 1,
  parameter int unsigned RW        = $clog2(ROWS + 1),
  parameter int unsigned CW        = $clog2(COLS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // tile command
  input  logic               start,
  input  logic [KW-1:0]      k_len,
  input  logic [RW-1:0]      act_rows,
  input  logic [CW-1:0]      act_cols,
  input  logic [IF_AW-1:0]   if_base,
  input  logic [FL_AW-1:0]   fl_base,
  input  logic [OF_AW-1:0]   of_base,
  input  logic [4:0]         out_shift,
  input  logic               acc_first,
  input  logic               acc_last,
  output logic               busy,
  output logic               done,
  output logic               ofmap_sat,
  // IFMAP SRAM, DRAM side
  input  logic               ifd_en,
  input  logic               ifd_we,
  input  logic [IF_AW-1:0]   ifd_addr,
  input  logic [IF_WB*8-1:0] ifd_wdata,
  output logic [IF_WB*8-1:0] ifd_rdata,
  output logic               ifd_rvalid,
  // Filter SRAM, DRAM side
  input  logic               fld_en,
  input  logic               fld_we,
  input  logic [FL_AW-1:0]   fld_addr,
  input  logic [FL_WB*8-1:0] fld_wdata,
  output logic [FL_WB*8-1:0] fld_rdata,
  output logic               fld_rvalid,
  // OFMAP SRAM, DRAM side
  input  logic               ofd_en,
  input  logic               ofd_we,
  input  logic [OF_AW-1:0]   ofd_addr,
  input  logic [OF_WB*8-1:0] ofd_wdata,
  output logic [OF_WB*8-1:0] ofd_rdata,
  output logic               ofd_rvalid
);

  localparam int unsigned IF_W = IF_WB * 8;
  localparam int unsigned FL_W = FL_WB * 8;
  localparam int unsigned OF_W = OF_WB * 8;

  // ---------------- controller ----------------
  logic             if_rd_en, fl_rd_en, of_wr_en;
  logic [IF_AW-1:0] if_rd_addr;
  logic [FL_AW-1:0] fl_rd_addr;
  logic [OF_AW-1:0] of_wr_addr;
  logic [ROWS-1:0]  row_en;
  logic [COLS-1:0]  col_en;
  logic             pe_clear, pe_drain;
  logic [4:0]       shift_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              shift_q <= '0;
    else if (start && !busy) shift_q <= out_shift;
  end

  os_controller #(
    .ROWS(ROWS), .COLS(COLS), .IF_AW(IF_AW), .FL_AW(FL_AW), .OF_AW(OF_AW),
    .LINK(LINK), .KW(KW), .RW(RW), .CW(CW)
  ) u_ctrl (
    .clk, .rst_n, .start, .k_len, .act_rows, .act_cols,
    .if_base, .fl_base, .of_base, .acc_first, .acc_last, .busy, .done,
    .if_rd_en, .if_rd_addr, .fl_rd_en, .fl_rd_addr,
    .row_en, .col_en, .pe_clear, .pe_drain, .of_wr_en, .of_wr_addr
  );

  // ---------------- IFMAP path: SRAM -> link -> skew -> left edge ----------
  logic [IF_W-1:0] if_rdata, if_link;
  logic            if_rvalid, if_link_vld;
  data_t           if_lanes [ROWS];
  data_t           a_left   [ROWS];
  logic [ROWS-1:0] a_left_vld;

  sram_tiered #(.CAP_KB(IF_KB), .WORD_BYTES(IF_WB), .PARTITION(PARTITION)) u_ifmap (
    .clk, .rst_n,
    .a_en(if_rd_en), .a_we(1'b0), .a_addr(if_rd_addr), .a_wdata('0),
    .a_rdata(if_rdata), .a_rvalid(if_rvalid),
    .b_en(ifd_en), .b_we(ifd_we), .b_addr(ifd_addr), .b_wdata(ifd_wdata),
    .b_rdata(ifd_rdata), .b_rvalid(ifd_rvalid)
  );

  edge_link #(.W(IF_W), .STAGES(LINK)) u_if_link (
    .clk, .rst_n, .in_data(if_rdata), .in_vld(if_rvalid),
    .out_data(if_link), .out_vld(if_link_vld)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_if_lane
    assign if_lanes[r] = data_t'(if_link[r*8 +: 8]);
  end

  skew_buffer #(.LANES(ROWS)) u_if_skew (
    .clk, .rst_n, .in_data(if_lanes), .in_vld(if_link_vld),
    .out_data(a_left), .out_vld(a_left_vld)
  );

  // ---------------- Filter path: SRAM -> link -> skew -> top edge ----------
  logic [FL_W-1:0] fl_rdata, fl_link;
  logic            fl_rvalid, fl_link_vld;
  data_t           fl_lanes [COLS];
  data_t           b_top    [COLS];
  logic [COLS-1:0] b_top_vld;

  sram_tiered #(.CAP_KB(FL_KB), .WORD_BYTES(FL_WB), .PARTITION(PARTITION)) u_filter (
    .clk, .rst_n,
    .a_en(fl_rd_en), .a_we(1'b0), .a_addr(fl_rd_addr), .a_wdata('0),
    .a_rdata(fl_rdata), .a_rvalid(fl_rvalid),
    .b_en(fld_en), .b_we(fld_we), .b_addr(fld_addr), .b_wdata(fld_wdata),
    .b_rdata(fld_rdata), .b_rvalid(fld_rvalid)
  );

  edge_link #(.W(FL_W), .STAGES(LINK)) u_fl_link (
    .clk, .rst_n, .in_data(fl_rdata), .in_vld(fl_rvalid),
    .out_data(fl_link), .out_vld(fl_link_vld)
  );

  for (genvar c = 0; c < COLS; c++) begin : g_fl_lane
    assign fl_lanes[c] = data_t'(fl_link[c*8 +: 8]);
  end

  skew_buffer #(.LANES(COLS)) u_fl_skew (
    .clk, .rst_n, .in_data(fl_lanes), .in_vld(fl_link_vld),
    .out_data(b_top), .out_vld(b_top_vld)
  );

  // ---------------- systolic array ----------------
  acc_t psum_bot [COLS];

  systolic_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst_n, .row_en, .col_en, .pe_clear, .pe_drain,
    .a_left, .a_left_vld, .b_top, .b_top_vld, .psum_bot
  );

  // ---------------- OFMAP path: bottom edge -> requant -> link -> SRAM -----
  logic [OF_W-1:0]       of_word;
  logic                  of_sat;
  logic [OF_W+OF_AW:0]   of_link_in, of_link_out;
  logic                  of_link_vld;
  logic [OF_W-1:0]       ofa_unused;
  logic                  ofa_rvalid_unused;

  ofmap_requant #(.COLS(COLS), .WORD_BYTES(OF_WB)) u_requant (
    .psum(psum_bot), .shift(shift_q), .word(of_word), .sat(of_sat)
  );

  assign of_link_in = {of_sat, of_wr_addr, of_word};

  edge_link #(.W(OF_W + OF_AW + 1), .STAGES(LINK)) u_of_link (
    .clk, .rst_n, .in_data(of_link_in), .in_vld(of_wr_en),
    .out_data(of_link_out), .out_vld(of_link_vld)
  );

  assign ofmap_sat = of_link_vld & of_link_out[OF_W+OF_AW];

  sram_tiered #(.CAP_KB(OF_KB), .WORD_BYTES(OF_WB), .PARTITION(PARTITION)) u_ofmap (
    .clk, .rst_n,
    .a_en(of_link_vld), .a_we(1'b1), .a_addr(of_link_out[OF_W +: OF_AW]),
    .a_wdata(of_link_out[OF_W-1:0]),
    .a_rdata(ofa_unused), .a_rvalid(ofa_rvalid_unused),
    .b_en(ofd_en), .b_we(ofd_we), .b_addr(ofd_addr), .b_wdata(ofd_wdata),
    .b_rdata(ofd_rdata), .b_rvalid(ofd_rvalid)
  );

endmodule
