// Full-size testbench of the RoBA multiplier top at its default parameters
// (8 x 8 bits, S-RoBA). Reproduces the published example -2 * 11 = -22, then
// checks every one of the 65,536 signed operand pairs against the arithmetic
// reference and, where an operand is a power of two or zero, against the exact
// product.
module tb_roba_full;
  import roba_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]  x, y;
  logic [15:0] p;

  roba dut (.x(x), .y(y), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 8'hFE; y = 8'd11;
    #1;
    checks++;
    if ($signed(p) != -16'sd22) begin
      failures++;
      $display("-2 * 11 -> %0d expected -22", $signed(p));
    end
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        longint got, ref_p;
        x = 8'(i); y = 8'(j);
        #1;
        got   = longint'($signed(p));
        ref_p = roba_s(i, j, 1'b1);
        checks++;
        if (got != ref_p) begin
          failures++;
          if (failures < 10) $display("%0d * %0d -> %0d expected %0d", i, j, got, ref_p);
        end
        if (is_pow2(i < 0 ? -i : i) || is_pow2(j < 0 ? -j : j) || i == 0 || j == 0) begin
          checks++;
          if (got != longint'(i) * j) begin
            failures++;
            if (failures < 10) $display("%0d * %0d -> %0d not exact", i, j, got);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
