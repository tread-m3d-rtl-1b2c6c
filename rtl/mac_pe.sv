// mac_pe: one processing element of the output-stationary systolic array.
//
// Each PE is a multiply-and-accumulate unit with internal registers. Every
// clock cycle it takes a signed 8-bit IFMAP operand from its left neighbour and
// a signed 8-bit filter operand from its upper neighbour, adds their product
// to its stationary accumulator when both operands are valid, and hands both
// operands (with their valid bits) on to the right and lower neighbours one
// cycle later. The accumulator stays in place for the whole reduction (output
// stationary); afterwards the accumulators of a column are shifted down one row
// per cycle (drain) so that the bottom-edge PE delivers the results.
//
// Interface / timing:
//   en     PE is inside the active region of the current tile. When low the
//          PE neither accumulates nor forwards (its outgoing valids drop to 0),
//          which models an idle PE.
//   clear  synchronous clear of the accumulator (start of a tile).
//   drain  acc <= psum_in (value of the PE above); takes priority over MAC.
//   psum_out is the accumulator register itself (no extra latency).
// The MAC behaviour and the right/down data movement follow the array
// description; the valid bits, clear/drain controls and 32-bit accumulator are
// this design's own choices.
module mac_pe
  import tread_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  clear,
  input  logic  drain,
  input  data_t a_in,
  input  logic  a_vld_in,
  input  data_t b_in,
  input  logic  b_vld_in,
  input  acc_t  psum_in,
  output data_t a_out,
  output logic  a_vld_out,
  output data_t b_out,
  output logic  b_vld_out,
  output acc_t  psum_out
);

  acc_t acc_q;
  acc_t product;

  always_comb product = acc_t'(a_in) * acc_t'(b_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      a_out     <= '0;
      b_out     <= '0;
      a_vld_out <= 1'b0;
      b_vld_out <= 1'b0;
    end else begin
      if (clear)
        acc_q <= '0;
      else if (drain)
        acc_q <= psum_in;
      else if (en && a_vld_in && b_vld_in)
        acc_q <= acc_q + product;

      if (en) begin
        a_out     <= a_in;
        b_out     <= b_in;
        a_vld_out <= a_vld_in;
        b_vld_out <= b_vld_in;
      end else begin
        a_vld_out <= 1'b0;
        b_vld_out <= 1'b0;
      end
    end
  end

  assign psum_out = acc_q;

endmodule
