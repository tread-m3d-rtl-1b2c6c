// os_controller: sequences one output-stationary tile on the systolic array.
//
// A tile computes act_rows output pixels (array rows) for act_cols filters
// (array columns) over a reduction of k_len steps. The IFMAP SRAM holds one
// word per reduction step with the operand of every output pixel (lane = array
// row); the Filter SRAM holds one word per step with the weight of every
// filter (lane = array column). The tile runs through these phases:
//   CLEAR  one cycle, zero every accumulator,
//   FEED   k_len cycles, read IFMAP and Filter word k (base + k) each cycle,
//   WAIT   LINK + act_rows + act_cols - 1 cycles, until the last operand pair
//          has reached PE(act_rows-1, act_cols-1) through the SRAM read
//          stage, the edge link and the skew buffers,
//   DRAIN  ROWS cycles, shift every column down one row per cycle; in drain
//          cycle d the bottom edge shows row ROWS-1-d, which is written to
//          OFMAP address of_base + ROWS-1-d when that row is active,
//   FLUSH  LINK cycles, let the last OFMAP write cross its edge link.
// done pulses for one cycle after FLUSH. From the clock edge that accepts
// start to the edge that first sees done, a tile takes
//   k_len + act_rows + act_cols + ROWS + 2*LINK + 1 cycles.
// A reduction longer than the operand SRAMs hold is run as a chain of chunks
// that accumulate in place: acc_first = 0 skips CLEAR (keep the partial sums)
// and acc_last = 0 skips DRAIN and FLUSH (done follows WAIT, after
//   k_len + act_rows + act_cols + LINK + 1 cycles).
// A plain tile has both flags set.
// start is ignored while busy. The configuration is captured at start.
//
// Output-stationary dataflow, single-cycle SRAM access and the edge roles
// follow the document; the phase structure, operand layout and drain order are
// this design's choices.
module os_controller
  import tread_pkg::*;
#(
  parameter int unsigned ROWS  = 64,
  parameter int unsigned COLS  = 54,
  parameter int unsigned IF_AW = 12,
  parameter int unsigned FL_AW = 12,
  parameter int unsigned OF_AW = 7,
  parameter int unsigned LINK  = 1,
  parameter int unsigned KW    = IF_AW + 1,
  parameter int unsigned RW    = $clog2(ROWS + 1),
  parameter int unsigned CW    = $clog2(COLS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // tile command
  input  logic             start,
  input  logic [KW-1:0]    k_len,
  input  logic [RW-1:0]    act_rows,
  input  logic [CW-1:0]    act_cols,
  input  logic [IF_AW-1:0] if_base,
  input  logic [FL_AW-1:0] fl_base,
  input  logic [OF_AW-1:0] of_base,
  input  logic             acc_first,
  input  logic             acc_last,
  output logic             busy,
  output logic             done,
  // SRAM read requests (array side)
  output logic             if_rd_en,
  output logic [IF_AW-1:0] if_rd_addr,
  output logic             fl_rd_en,
  output logic [FL_AW-1:0] fl_rd_addr,
  // array control
  output logic [ROWS-1:0]  row_en,
  output logic [COLS-1:0]  col_en,
  output logic             pe_clear,
  output logic             pe_drain,
  // OFMAP write request (enters the OFMAP edge link with the data)
  output logic             of_wr_en,
  output logic [OF_AW-1:0] of_wr_addr
);

  typedef enum logic [2:0] {
    S_IDLE, S_CLEAR, S_FEED, S_WAIT, S_DRAIN, S_FLUSH
  } state_e;

  localparam int unsigned CNTW = (KW > RW + CW + 2) ? KW : RW + CW + 2;

  state_e            state_q;
  logic [CNTW-1:0]   cnt_q;
  logic [KW-1:0]     k_q;
  logic [RW-1:0]     rows_q;
  logic [CW-1:0]     cols_q;
  logic [IF_AW-1:0]  if_base_q;
  logic [FL_AW-1:0]  fl_base_q;
  logic [OF_AW-1:0]  of_base_q;
  logic              first_q, last_q;
  logic [CNTW-1:0]   wait_len;
  logic [CNTW-1:0]   drain_row;

  assign wait_len  = CNTW'(LINK) + CNTW'(rows_q) + CNTW'(cols_q) - 1'b1;
  assign drain_row = CNTW'(ROWS - 1) - cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      cnt_q     <= '0;
      k_q       <= '0;
      rows_q    <= '0;
      cols_q    <= '0;
      if_base_q <= '0;
      fl_base_q <= '0;
      of_base_q <= '0;
      first_q   <= 1'b0;
      last_q    <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          k_q       <= k_len;
          rows_q    <= act_rows;
          cols_q    <= act_cols;
          if_base_q <= if_base;
          fl_base_q <= fl_base;
          of_base_q <= of_base;
          first_q   <= acc_first;
          last_q    <= acc_last;
          cnt_q     <= '0;
          state_q   <= S_CLEAR;
        end
        S_CLEAR: begin
          cnt_q   <= '0;
          state_q <= (k_q == '0) ? S_WAIT : S_FEED;
        end
        S_FEED: begin
          if (cnt_q == CNTW'(k_q) - 1'b1) begin
            cnt_q   <= '0;
            state_q <= S_WAIT;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_WAIT: begin
          if (cnt_q == wait_len - 1'b1) begin
            cnt_q <= '0;
            if (last_q) begin
              state_q <= S_DRAIN;
            end else begin
              state_q <= S_IDLE;
              done    <= 1'b1;
            end
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_DRAIN: begin
          if (cnt_q == CNTW'(ROWS - 1)) begin
            cnt_q <= '0;
            if (LINK == 0) begin
              state_q <= S_IDLE;
              done    <= 1'b1;
            end else begin
              state_q <= S_FLUSH;
            end
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_FLUSH: begin
          if (cnt_q == CNTW'(LINK) - 1'b1) begin
            cnt_q   <= '0;
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy       = (state_q != S_IDLE);
  assign if_rd_en   = (state_q == S_FEED);
  assign fl_rd_en   = (state_q == S_FEED);
  assign if_rd_addr = if_base_q + IF_AW'(cnt_q);
  assign fl_rd_addr = fl_base_q + FL_AW'(cnt_q);
  assign pe_clear   = (state_q == S_CLEAR) && first_q;
  assign pe_drain   = (state_q == S_DRAIN);
  assign of_wr_en   = (state_q == S_DRAIN) && (drain_row < CNTW'(rows_q));
  assign of_wr_addr = of_base_q + OF_AW'(drain_row);

  always_comb begin
    for (int r = 0; r < ROWS; r++) row_en[r] = (RW'(r) < rows_q);
    for (int c = 0; c < COLS; c++) col_en[c] = (CW'(c) < cols_q);
  end

  // A tile must use at least one row and column, and no more than the array.
  a_tile_shape: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> (act_rows != '0 && act_rows <= RW'(ROWS) &&
                          act_cols != '0 && act_cols <= CW'(COLS)));

endmodule
