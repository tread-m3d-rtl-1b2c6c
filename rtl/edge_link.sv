// edge_link: the repeated wire between an SRAM and the edge of the systolic
// array, modelled as a pipeline stage of its own.
//
// The accelerator's clock period is set by the slowest of three stages: PE,
// SRAM access and the SRAM-to-array interconnect. This module is that third
// stage: STAGES register levels (default 1) that carry a W-bit word and its
// valid bit from one end of the wire to the other. With STAGES = 0 it is a
// plain wire.
//
// Interface / timing: out = in delayed by STAGES cycles; reset clears valid
// and data. Treating the wire as one register stage follows the document's
// frequency model; the valid bit and reset values are this design's choice.
module edge_link #(
  parameter int unsigned W      = 512,
  parameter int unsigned STAGES = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_data,
  input  logic         in_vld,
  output logic [W-1:0] out_data,
  output logic         out_vld
);

  if (STAGES == 0) begin : g_wire
    assign out_data = in_data;
    assign out_vld  = in_vld;
  end else begin : g_pipe
    logic [W-1:0] d_q [STAGES];
    logic [STAGES-1:0] v_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < STAGES; s++) d_q[s] <= '0;
        v_q <= '0;
      end else begin
        d_q[0] <= in_data;
        v_q[0] <= in_vld;
        for (int s = 1; s < STAGES; s++) begin
          d_q[s] <= d_q[s-1];
          v_q[s] <= v_q[s-1];
        end
      end
    end

    assign out_data = d_q[STAGES-1];
    assign out_vld  = v_q[STAGES-1];
  end

endmodule
