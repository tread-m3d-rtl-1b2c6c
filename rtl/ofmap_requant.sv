// ofmap_requant: turns the bottom-edge accumulators into an 8-bit OFMAP word.
//
// The array accumulates in ACC_W bits but operands and feature maps are 8-bit
// integers, so each result is arithmetically shifted right by `shift` and
// saturated to [-128, 127] before it is written to the OFMAP SRAM. Lane c of
// the result word is column c of the array; bytes beyond COLS (the port is
// rounded up to a power of two) are zero. `sat` is high when any lane clipped.
// Purely combinational. The document states 8-bit data; the shift-and-
// saturate rule is this design's choice.
module ofmap_requant
  import tread_pkg::*;
#(
  parameter int unsigned COLS       = 54,
  parameter int unsigned WORD_BYTES = 64
) (
  input  acc_t                      psum [COLS],
  input  logic [4:0]                shift,
  output logic [WORD_BYTES*8-1:0]   word,
  output logic                      sat
);

  localparam acc_t MAXV = acc_t'(127);
  localparam acc_t MINV = -acc_t'(128);

  always_comb begin
    acc_t s;
    word = '0;
    sat  = 1'b0;
    for (int c = 0; c < COLS; c++) begin
      s = psum[c] >>> shift;
      if (s > MAXV) begin
        word[c*8 +: 8] = 8'h7f;
        sat = 1'b1;
      end else if (s < MINV) begin
        word[c*8 +: 8] = 8'h80;
        sat = 1'b1;
      end else begin
        word[c*8 +: 8] = s[7:0];
      end
    end
  end

endmodule
