// End-to-end testbench of the RoBA multiplier top, all three architectures.
//
// Instantiates roba three times at N = 8 (S-RoBA, AS-RoBA, URoBA) and drives all
// 65,536 operand pairs into each, comparing every product with an arithmetic
// reference. It first reproduces the published example -2 * 11 = -22 on the
// S-RoBA instance. It counts how often each mechanism of the method is
// exercised and fails if one never is: rounding down, rounding up, a tie
// rounded up, rounding of an unsigned operand into the extra (2^N) bit, an
// exact product from a power-of-two operand, a zero operand, the sign set
// negating the result, and the ones' complement negation of AS-RoBA departing
// from the exact S-RoBA result.
module tb_roba;
  import roba_pkg::*;
  import roba_ref_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p_s, p_as, p_u;

  roba #(.N(N), .MODE(S_ROBA))  dut_s  (.x(x), .y(y), .p(p_s));
  roba #(.N(N), .MODE(AS_ROBA)) dut_as (.x(x), .y(y), .p(p_as));
  roba #(.N(N), .MODE(U_ROBA))  dut_u  (.x(x), .y(y), .p(p_u));

  int n_round_down, n_round_up, n_tie, n_top_bit, n_pow2_exact, n_zero, n_negated, n_approx_diff;

  task automatic check(string what, longint got, longint expected, int xi, int yi);
    checks++;
    if (got != expected) begin
      failures++;
      if (failures < 10) $display("%s: %0d * %0d -> %0d expected %0d", what, xi, yi, got, expected);
    end
  endtask

  // Classify how an unsigned magnitude is rounded.
  task automatic count_rounding(longint a);
    longint r;
    r = round_pow2(a);
    if (a == 0) return;
    if (r < a) n_round_down++;
    if (r > a) n_round_up++;
    if (2 * a == 3 * (r / 2) && r > a) n_tie++;
    if (r == (longint'(1) << N)) n_top_bit++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {n_round_down, n_round_up, n_tie, n_top_bit, n_pow2_exact, n_zero, n_negated, n_approx_diff} = '0;

    // Published example: x = -2, y = 11 gives p = -22.
    x = N'(-2); y = N'(11);
    #1;
    check("example", longint'($signed(p_s)), -22, -2, 11);

    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        longint xs, ys, e_s, e_as, e_u;
        x = N'(i); y = N'(j);
        #1;
        xs = longint'($signed(x));
        ys = longint'($signed(y));
        e_s  = roba_s(xs, ys, 1'b1);
        e_as = roba_s(xs, ys, 1'b0);
        e_u  = roba_u(i, j);
        check("S-RoBA",  longint'($signed(p_s)),  e_s,  int'(xs), int'(ys));
        check("AS-RoBA", longint'($signed(p_as)), e_as, int'(xs), int'(ys));
        check("URoBA",   longint'(p_u),           e_u,  i, j);

        count_rounding(i);
        if (is_pow2(i) || is_pow2(j)) begin
          n_pow2_exact++;
          check("URoBA power of two exact", longint'(p_u), longint'(i) * j, i, j);
        end
        if (i == 0 || j == 0) begin
          n_zero++;
          check("zero operand", longint'(p_s) | longint'(p_u), 0, i, j);
        end
        if ((xs < 0) != (ys < 0) && e_s != 0) n_negated++;
        if (e_as != e_s) n_approx_diff++;
      end
    end

    $display("round down %0d, round up %0d, tie %0d, extra bit %0d, power-of-two %0d, zero %0d, negated %0d, approx negation %0d",
             n_round_down, n_round_up, n_tie, n_top_bit, n_pow2_exact, n_zero, n_negated, n_approx_diff);
    if (n_round_down == 0)  begin failures++; $display("rounding down never happened"); end
    if (n_round_up == 0)    begin failures++; $display("rounding up never happened"); end
    if (n_tie == 0)         begin failures++; $display("tie never happened"); end
    if (n_top_bit == 0)     begin failures++; $display("rounding into bit N never happened"); end
    if (n_pow2_exact == 0)  begin failures++; $display("power-of-two operand never happened"); end
    if (n_zero == 0)        begin failures++; $display("zero operand never happened"); end
    if (n_negated == 0)     begin failures++; $display("sign set negation never happened"); end
    if (n_approx_diff == 0) begin failures++; $display("approximate negation never mattered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
