// Testbench of roba_addsub: random operands with a + b >= c, against integer
// arithmetic.
module tb_roba_addsub;
  localparam int W = 17;
  int checks = 0, failures = 0;

  logic [W-1:0] a, b, c, s;

  roba_addsub #(.W(W)) dut (.a(a), .b(b), .c(c), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      longint sa, sb, sc;
      sa = longint'($urandom_range(0, 65535));
      sb = longint'($urandom_range(0, 65535));
      sc = longint'($urandom_range(0, 32'(sa + sb)));
      a = W'(sa); b = W'(sb); c = W'(sc);
      #1;
      checks++;
      if (longint'(s) != sa + sb - sc) begin
        failures++;
        if (failures < 10) $display("%0d + %0d - %0d = %0d", sa, sb, sc, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
