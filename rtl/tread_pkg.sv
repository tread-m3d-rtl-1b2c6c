// tread_pkg: types and constants shared by the output-stationary systolic
// accelerator.
//
// DATA_W is the 8-bit integer operand width used throughout the design.
// ACC_W, the width of each PE's stationary accumulator, is this design's own
// choice (32 bits: no overflow for any reduction of up to 65536 int8 products).
// partition_e names the three two-tier organisations of an SRAM buffer:
//   PART_A           the SRAM is an unchanged 2D macro (stacked on the array),
//   PART_B_WORDLINE  every word is split in two halves, one per tier, each tier
//                    with its own wordline drivers,
//   PART_B_BITLINE   the rows are split between the tiers and a mux picks the
//                    tier that holds the addressed row.
// pow2_ceil() rounds an SRAM port width up to a power of two, as the SRAM
// ports are sized from the array edge (rows for IFMAP, columns for Filter and
// OFMAP) rounded up to a power of two.
package tread_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned ACC_W  = 32;

  typedef enum logic [1:0] {
    PART_A          = 2'd0,
    PART_B_BITLINE  = 2'd1,
    PART_B_WORDLINE = 2'd2
  } partition_e;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  function automatic int unsigned pow2_ceil(input int unsigned n);
    int unsigned p;
    p = 1;
    while (p < n) p = p << 1;
    return p;
  endfunction

  function automatic int unsigned clog2_min1(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
