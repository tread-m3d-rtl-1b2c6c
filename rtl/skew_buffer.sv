// skew_buffer: staggers an edge operand bus into a systolic wavefront.
//
// One word read from an SRAM carries one operand per array row (IFMAP) or per
// array column (filter). For the operands of reduction step k to meet in
// PE(r,c) on the same cycle, lane i must enter the array i cycles later than
// lane 0. Lane i is therefore a chain of i registers (lane 0 passes straight
// through); the valid bit travels with the data. The buffer holds
// LANES*(LANES-1)/2 registers per bit of lane width.
//
// Interface / timing: in_data/in_vld sampled every cycle; out lane i equals
// in lane i delayed by exactly i cycles. Registers reset to invalid.
// The document only states that edge PEs read their SRAM every cycle; this
// triangular delay structure is this design's choice.
module skew_buffer
  import tread_pkg::*;
#(
  parameter int unsigned LANES = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  data_t             in_data [LANES],
  input  logic              in_vld,
  output data_t             out_data[LANES],
  output logic [LANES-1:0]  out_vld
);

  assign out_data[0] = in_data[0];
  assign out_vld[0]  = in_vld;

  for (genvar i = 1; i < LANES; i++) begin : g_lane
    data_t      d_q [i];
    logic [i-1:0] v_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int j = 0; j < i; j++) d_q[j] <= '0;
        v_q <= '0;
      end else begin
        d_q[0] <= in_data[i];
        v_q[0] <= in_vld;
        for (int j = 1; j < i; j++) begin
          d_q[j] <= d_q[j-1];
          v_q[j] <= v_q[j-1];
        end
      end
    end

    assign out_data[i] = d_q[i-1];
    assign out_vld[i]  = v_q[i-1];
  end

endmodule
