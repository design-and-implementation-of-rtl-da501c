// Testbench of roba_rounding: every input at widths 8 and 4 against the nearest
// power of two computed arithmetically; also checks that the output is one-hot.
module tb_roba_rounding;
  import roba_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0] a8;
  logic [8:0] r8;
  logic [3:0] a4;
  logic [4:0] r4;

  roba_rounding #(.W(8)) dut8 (.a(a8), .ar(r8));
  roba_rounding #(.W(4)) dut4 (.a(a4), .ar(r4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      a8 = 8'(v);
      a4 = 4'(v);
      #1;
      checks++;
      if (longint'(r8) != round_pow2(v) || (v != 0 && !$onehot(r8))) begin
        failures++;
        if (failures < 10) $display("W=8 a=%0d ar=%0d expected %0d", v, r8, round_pow2(v));
      end
      if (v < 16) begin
        checks++;
        if (longint'(r4) != round_pow2(v)) begin
          failures++;
          if (failures < 10) $display("W=4 a=%0d ar=%0d expected %0d", v, r4, round_pow2(v));
        end
      end
    end
    // Spot values: ties round up, 11 -> 8, 13 -> 16
    a8 = 8'd12; #1; checks++; if (r8 != 9'd16)  failures++;
    a8 = 8'd11; #1; checks++; if (r8 != 9'd8)   failures++;
    a8 = 8'd13; #1; checks++; if (r8 != 9'd16)  failures++;
    a8 = 8'd192; #1; checks++; if (r8 != 9'd256) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
