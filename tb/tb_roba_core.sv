// Testbench of roba_core (the unsigned RoBA datapath): every pair of 8-bit and
// 4-bit operands against the arithmetic reference. It also checks two
// properties of the method: the product is exact when an operand is a power of
// two or zero, and the error never exceeds a ninth of the exact product.
module tb_roba_core;
  import roba_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;

  roba_core #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));
  roba_core #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        longint exact, got;
        a8 = 8'(i); b8 = 8'(j);
        a4 = 4'(i); b4 = 4'(j);
        #1;
        got   = longint'(p8);
        exact = longint'(i) * j;
        checks++;
        if (got != roba_u(i, j)) begin
          failures++;
          if (failures < 10) $display("N=8 %0d*%0d -> %0d expected %0d", i, j, got, roba_u(i, j));
        end
        if (is_pow2(i) || is_pow2(j) || i == 0 || j == 0) checks++;
        if ((is_pow2(i) || is_pow2(j) || i == 0 || j == 0) && got != exact) begin
          failures++;
          if (failures < 10) $display("N=8 %0d*%0d -> %0d not exact", i, j, got);
        end
        checks++;
        if (9 * (got > exact ? got - exact : exact - got) > exact) begin
          failures++;
          if (failures < 10) $display("N=8 %0d*%0d -> %0d error too large", i, j, got);
        end
        if (i < 16 && j < 16) begin
          checks++;
          if (longint'(p4) != roba_u(i, j)) begin
            failures++;
            if (failures < 10) $display("N=4 %0d*%0d -> %0d expected %0d", i, j, p4, roba_u(i, j));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
