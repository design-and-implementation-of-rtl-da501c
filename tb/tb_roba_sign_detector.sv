// Testbench of roba_sign_detector: all 8-bit operands, exact and ones'
// complement negation, against integer arithmetic.
module tb_roba_sign_detector;
  localparam int N = 8;
  int checks = 0, failures = 0;

  logic [N-1:0] x;
  logic         s_e, s_a;
  logic [N-1:0] m_e, m_a;

  roba_sign_detector #(.N(N), .EXACT(1'b1)) dut_e (.x(x), .sign(s_e), .mag(m_e));
  roba_sign_detector #(.N(N), .EXACT(1'b0)) dut_a (.x(x), .sign(s_a), .mag(m_a));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (N - 1)); v < (1 << (N - 1)); v++) begin
      int exp_e, exp_a;
      x = N'(v);
      #1;
      exp_e = (v < 0) ? -v : v;
      exp_a = (v < 0) ? -v - 1 : v;
      checks++;
      if (s_e !== (v < 0) || s_a !== (v < 0) || int'(m_e) != exp_e || int'(m_a) != exp_a) begin
        failures++;
        if (failures < 10)
          $display("x=%0d sign=%b/%b mag=%0d/%0d expected %0d/%0d", v, s_e, s_a, m_e, m_a, exp_e, exp_a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
