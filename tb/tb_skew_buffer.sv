// tb_skew_buffer: checks that lane i of the skew buffer is lane i of the input
// delayed by exactly i cycles, data and valid, for a 9-lane buffer.
module tb_skew_buffer;
  import tread_pkg::*;
  localparam int L = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  data_t in_data [L];
  data_t out_data[L];
  logic in_vld;
  logic [L-1:0] out_vld;
  int checks = 0, failures = 0;
  data_t hd [64][L];
  logic  hv [64];

  skew_buffer #(.LANES(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_vld = 0;
    for (int i = 0; i < L; i++) in_data[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      in_vld = $urandom_range(0, 1);
      for (int i = 0; i < L; i++) in_data[i] = data_t'($urandom);
      hv[t % 64] = in_vld;
      for (int i = 0; i < L; i++) hd[t % 64][i] = in_data[i];
      #1;
      if (t >= L) begin
        for (int i = 0; i < L; i++) begin
          checks++;
          if (out_vld[i] != hv[(t - i) % 64]) failures++;
          if (hv[(t - i) % 64]) begin
            checks++;
            if (out_data[i] != hd[(t - i) % 64][i]) failures++;
          end
        end
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
