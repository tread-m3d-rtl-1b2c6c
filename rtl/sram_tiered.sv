// sram_tiered: on-chip SRAM buffer of the accelerator (IFMAP, Filter or
// OFMAP), with the three two-tier organisations studied for monolithic 3D.
//
// Capacity is CAP_KB kilobytes, one access moves WORD_BYTES bytes, and every
// access completes in one cycle (the array reads its edge operands every
// cycle). PARTITION selects how the data array is laid out over the tiers:
//   PART_A           one 2D array (the whole macro sits on one tier),
//   PART_B_WORDLINE  each word is split along its wordline: the low half of the
//                    bits lives in tier 0 and the high half in tier 1, each
//                    tier with its own wordline drivers; both tiers are
//                    accessed together,
//   PART_B_BITLINE   the rows are split along the bitlines: rows with address
//                    MSB = 0 live in tier 0, the others in tier 1; both tiers
//                    have sense amplifiers and a registered tier select drives
//                    the output mux.
// All three behave identically at the ports; only the internal structure (and
// so timing and power in silicon) differs.
//
// Two ports: port A faces the systolic array, port B faces off-chip DRAM so
// that operand fills and result write-back can overlap with computation.
// Both ports can read or write; on a same-cycle write to the same address
// port A wins. Read data appears the cycle after the request with rvalid.
// The partition styles, capacity and port width follow the document; the
// second port, the collision rule and the bitline tier select on the address
// MSB are this design's choices.
module sram_tiered
  import tread_pkg::*;
#(
  parameter int unsigned CAP_KB     = 256,
  parameter int unsigned WORD_BYTES = 64,
  parameter partition_e  PARTITION  = PART_B_WORDLINE,
  parameter int unsigned DEPTH      = CAP_KB * 1024 / WORD_BYTES,
  parameter int unsigned AW         = clog2_min1(DEPTH),
  parameter int unsigned W          = WORD_BYTES * 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // port A: array side
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  output logic          a_rvalid,
  // port B: DRAM side
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata,
  output logic          b_rvalid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_rvalid <= 1'b0;
      b_rvalid <= 1'b0;
    end else begin
      a_rvalid <= a_en & ~a_we;
      b_rvalid <= b_en & ~b_we;
    end
  end

  if (PARTITION == PART_B_WORDLINE) begin : g_wordline
    localparam int unsigned HW = W / 2;
    logic [HW-1:0] tier0 [DEPTH];
    logic [HW-1:0] tier1 [DEPTH];
    logic [HW-1:0] a_r0, a_r1, b_r0, b_r1;

    // Tier 0: low half of every word.
    always_ff @(posedge clk) begin
      if (b_en && b_we) tier0[b_addr] <= b_wdata[HW-1:0];
      if (a_en && a_we) tier0[a_addr] <= a_wdata[HW-1:0];
      if (a_en && !a_we) a_r0 <= tier0[a_addr];
      if (b_en && !b_we) b_r0 <= tier0[b_addr];
    end
    // Tier 1: high half of every word.
    always_ff @(posedge clk) begin
      if (b_en && b_we) tier1[b_addr] <= b_wdata[W-1:HW];
      if (a_en && a_we) tier1[a_addr] <= a_wdata[W-1:HW];
      if (a_en && !a_we) a_r1 <= tier1[a_addr];
      if (b_en && !b_we) b_r1 <= tier1[b_addr];
    end
    assign a_rdata = {a_r1, a_r0};
    assign b_rdata = {b_r1, b_r0};

  end else if (PARTITION == PART_B_BITLINE) begin : g_bitline
    localparam int unsigned HD = DEPTH / 2;
    logic [W-1:0] tier0 [HD];
    logic [W-1:0] tier1 [HD];
    logic [W-1:0] a_r0, a_r1, b_r0, b_r1;
    logic         a_sel_q, b_sel_q;
    logic         a_sel, b_sel;
    logic [AW-2:0] a_row, b_row;

    assign a_sel = a_addr[AW-1];
    assign b_sel = b_addr[AW-1];
    assign a_row = a_addr[AW-2:0];
    assign b_row = b_addr[AW-2:0];

    // Tier 0: lower half of the rows, with its own sense amplifiers.
    always_ff @(posedge clk) begin
      if (b_en && b_we && !b_sel) tier0[b_row] <= b_wdata;
      if (a_en && a_we && !a_sel) tier0[a_row] <= a_wdata;
      if (a_en && !a_we) a_r0 <= tier0[a_row];
      if (b_en && !b_we) b_r0 <= tier0[b_row];
    end
    // Tier 1: upper half of the rows.
    always_ff @(posedge clk) begin
      if (b_en && b_we && b_sel) tier1[b_row] <= b_wdata;
      if (a_en && a_we && a_sel) tier1[a_row] <= a_wdata;
      if (a_en && !a_we) a_r1 <= tier1[a_row];
      if (b_en && !b_we) b_r1 <= tier1[b_row];
    end
    // Output mux between the tiers.
    always_ff @(posedge clk) begin
      if (a_en && !a_we) a_sel_q <= a_sel;
      if (b_en && !b_we) b_sel_q <= b_sel;
    end
    assign a_rdata = a_sel_q ? a_r1 : a_r0;
    assign b_rdata = b_sel_q ? b_r1 : b_r0;

  end else begin : g_flat
    logic [W-1:0] mem [DEPTH];
    logic [W-1:0] a_r, b_r;

    always_ff @(posedge clk) begin
      if (b_en && b_we) mem[b_addr] <= b_wdata;
      if (a_en && a_we) mem[a_addr] <= a_wdata;
      if (a_en && !a_we) a_r <= mem[a_addr];
      if (b_en && !b_we) b_r <= mem[b_addr];
    end
    assign a_rdata = a_r;
    assign b_rdata = b_r;
  end

endmodule
