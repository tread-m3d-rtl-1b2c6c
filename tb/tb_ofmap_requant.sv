// tb_ofmap_requant: checks the shift-and-saturate conversion of bottom-edge
// accumulators to an OFMAP word for random values and shifts, including values
// just inside and just outside the int8 range, the padding bytes above COLS
// and the saturation flag.
module tb_ofmap_requant;
  import tread_pkg::*;
  localparam int COLS = 5, WB = 8;
  acc_t psum [COLS];
  logic [4:0] shift;
  logic [WB*8-1:0] word;
  logic sat;
  int checks = 0, failures = 0, n_sat = 0, n_pass = 0;

  ofmap_requant #(.COLS(COLS), .WORD_BYTES(WB)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_sat;
    longint v;
    for (int t = 0; t < 3000; t++) begin
      exp_sat = 0;
      shift = 5'($urandom_range(0, 31));
      for (int c = 0; c < COLS; c++) begin
        case ($urandom_range(0, 3))
          0: psum[c] = acc_t'($urandom);
          1: psum[c] = acc_t'($signed($urandom_range(0, 511)) - 256);
          2: psum[c] = acc_t'(128 << shift) - acc_t'($urandom_range(0, 1));
          default: psum[c] = -acc_t'(128 << shift) - acc_t'($urandom_range(0, 1) << shift);
        endcase
      end
      #1;
      for (int c = 0; c < COLS; c++) begin
        v = longint'(psum[c]) >>> shift;
        if (v > 127) begin v = 127; exp_sat = 1; end
        if (v < -128) begin v = -128; exp_sat = 1; end
        checks++;
        if (word[c*8 +: 8] != 8'(v)) failures++;
      end
      checks++; if (word[WB*8-1:COLS*8] != '0) failures++;
      checks++; if (sat != exp_sat) failures++;
      if (exp_sat) n_sat++; else n_pass++;
      #1;
    end
    checks++; if (n_sat == 0 || n_pass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
