// Testbench of roba_sign_set: random magnitudes with both signs, exact and
// ones' complement negation, against integer arithmetic.
module tb_roba_sign_set;
  localparam int W = 16;
  int checks = 0, failures = 0;

  logic         neg;
  logic [W-1:0] mag, p_e, p_a;

  roba_sign_set #(.W(W), .EXACT(1'b1)) dut_e (.neg(neg), .mag(mag), .p(p_e));
  roba_sign_set #(.W(W), .EXACT(1'b0)) dut_a (.neg(neg), .mag(mag), .p(p_a));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int m, exp_e, exp_a;
      m   = $urandom_range(0, 32767);
      if (t < 2) m = t;
      neg = t[0] ^ t[1];
      mag = W'(m);
      #1;
      exp_e = neg ? -m : m;
      exp_a = neg ? -m - 1 : m;
      checks++;
      if (int'($signed(p_e)) != exp_e || int'($signed(p_a)) != exp_a) begin
        failures++;
        if (failures < 10) $display("neg=%b mag=%0d p=%0d/%0d", neg, m, $signed(p_e), $signed(p_a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
