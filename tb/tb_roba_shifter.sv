// Testbench of roba_shifter: random words times every one-hot power of two and
// zero, against multiplication.
module tb_roba_shifter;
  localparam int DW = 9, SW = 9, OW = 17;
  int checks = 0, failures = 0;

  logic [DW-1:0] d;
  logic [SW-1:0] oh;
  logic [OW-1:0] q;

  roba_shifter #(.DW(DW), .SW(SW), .OW(OW)) dut (.d(d), .onehot(oh), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      d = DW'($urandom);
      if (t == 0) d = '1;
      for (int j = -1; j < SW; j++) begin
        longint exp_q;
        oh = (j < 0) ? '0 : SW'(1) << j;
        #1;
        exp_q = (j < 0) ? 0 : longint'(d) * (longint'(1) << j);
        checks++;
        if (longint'(q) != exp_q) begin
          failures++;
          if (failures < 10) $display("d=%0d j=%0d q=%0d expected %0d", d, j, q, exp_q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
