// tb_edge_link: checks that the interconnect stage delays data and valid by
// exactly STAGES cycles, for the default single stage and for three stages.
module tb_edge_link;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] din;
  logic        vin;
  logic [31:0] d1, d3;
  logic        v1, v3;
  int checks = 0, failures = 0;
  logic [32:0] hist [8];

  edge_link #(.W(32))               u1 (.clk, .rst_n, .in_data(din), .in_vld(vin), .out_data(d1), .out_vld(v1));
  edge_link #(.W(32), .STAGES(3))   u3 (.clk, .rst_n, .in_data(din), .in_vld(vin), .out_data(d3), .out_vld(v3));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0; vin = 0;
    for (int i = 0; i < 8; i++) hist[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    #1;
    checks++; if (v1 || v3) failures++;
    for (int i = 0; i < 500; i++) begin
      din = $urandom; vin = $urandom_range(0, 1);
      @(posedge clk);
      for (int j = 7; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = {vin, din};
      #1;
      if (i >= 3) begin
        checks++; if ({v1, d1} != hist[0]) failures++;
        checks++; if ({v3, d3} != hist[2]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
