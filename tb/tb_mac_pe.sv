// tb_mac_pe: self-checking test of one processing element.
// Drives random operands, valids, enable, clear and drain for 2000 cycles and
// compares the accumulator and the forwarded operands, cycle by cycle, with a
// reference model kept in the testbench.
module tb_mac_pe;
  import tread_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en, clear, drain, a_vld_in, b_vld_in;
  data_t a_in, b_in, a_out, b_out;
  logic a_vld_out, b_vld_out;
  acc_t psum_in, psum_out;

  int checks = 0, failures = 0;
  longint model_acc;
  data_t  m_a, m_b;
  logic   m_av, m_bv;
  int     n_mac = 0, n_drain = 0, n_clear = 0, n_idle = 0;

  mac_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    en = 0; clear = 0; drain = 0; a_vld_in = 0; b_vld_in = 0;
    a_in = '0; b_in = '0; psum_in = '0;
    model_acc = 0; m_a = '0; m_b = '0; m_av = 0; m_bv = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      // drive inputs after the edge
      en       = ($urandom_range(0, 9) != 0);
      clear    = ($urandom_range(0, 49) == 0);
      drain    = !clear && ($urandom_range(0, 29) == 0);
      a_vld_in = ($urandom_range(0, 3) != 0);
      b_vld_in = ($urandom_range(0, 3) != 0);
      a_in     = data_t'($urandom);
      b_in     = data_t'($urandom);
      psum_in  = acc_t'($urandom);
      @(posedge clk);
      // reference update for the edge that just happened
      if (clear) begin model_acc = 0; n_clear++; end
      else if (drain) begin model_acc = longint'(psum_in); n_drain++; end
      else if (en && a_vld_in && b_vld_in) begin
        model_acc = longint'(acc_t'(model_acc + longint'(a_in) * longint'(b_in)));
        n_mac++;
      end
      if (en) begin m_a = a_in; m_b = b_in; m_av = a_vld_in; m_bv = b_vld_in; end
      else begin m_av = 0; m_bv = 0; n_idle++; end
      #1;
      check(psum_out == acc_t'(model_acc), "accumulator");
      check(a_vld_out == m_av && b_vld_out == m_bv, "valid forwarding");
      if (m_av) check(a_out == m_a, "ifmap forwarding");
      if (m_bv) check(b_out == m_b, "filter forwarding");
    end
    check(n_mac > 100 && n_drain > 10 && n_clear > 10 && n_idle > 10, "all modes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
