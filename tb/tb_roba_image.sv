// Image-filtering workload on the RoBA multiplier (8-bit S-RoBA, defaults).
//
// Runs two 3x3 convolutions, smoothing and sharpening, over a generated 32x32
// image with 7-bit pixels (0..127, so that they are non-negative 8-bit signed
// operands). Every pixel-times-coefficient product goes through the multiplier,
// one per step, and is checked against the arithmetic RoBA reference. The
// filtered images are also computed with exact products, and the peak
// signal-to-noise ratio of the approximate image against the exact one is
// printed; it must exceed 15 dB for either filter.
//
// Kernels (a choice of this testbench, chosen so that several coefficients are
// not powers of two and are therefore rounded):
//   smoothing  [3 6 3; 6 12 6; 3 6 3] / 48
//   sharpening [0 -1 0; -1 5 -1; 0 -1 0]
// The image border is left out; results are clipped to 0..127.
module tb_roba_image;
  import roba_ref_pkg::*;
  localparam int S = 32;
  int checks = 0, failures = 0;

  logic [7:0]  x, y;
  logic [15:0] p;

  roba dut (.x(x), .y(y), .p(p));

  int img [S][S];
  int ksm [3][3] = '{'{3, 6, 3}, '{6, 12, 6}, '{3, 6, 3}};
  int ksh [3][3] = '{'{0, -1, 0}, '{-1, 5, -1}, '{0, -1, 0}};

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 127 ? 127 : v);
  endfunction

  task automatic run_filter(string name, int k [3][3], int div);
    real se, psnr;
    int  npix;
    se = 0.0;
    npix = 0;
    for (int r = 1; r < S - 1; r++) begin
      for (int c = 1; c < S - 1; c++) begin
        int acc_a, acc_e, oa, oe;
        acc_a = 0;
        acc_e = 0;
        for (int i = 0; i < 3; i++) begin
          for (int j = 0; j < 3; j++) begin
            int pix;
            pix = img[r + i - 1][c + j - 1];
            x = 8'(pix);
            y = 8'(k[i][j]);
            #1;
            checks++;
            if (longint'($signed(p)) != roba_s(pix, k[i][j], 1'b1)) begin
              failures++;
              if (failures < 10) $display("%s: %0d * %0d -> %0d", name, pix, k[i][j], $signed(p));
            end
            acc_a += int'($signed(p));
            acc_e += pix * k[i][j];
          end
        end
        oa = clip(acc_a / div);
        oe = clip(acc_e / div);
        se += real'((oa - oe) * (oa - oe));
        npix++;
      end
    end
    if (se == 0.0) psnr = 99.0;
    else psnr = 10.0 * $log10(real'(127 * 127) * npix / se);
    $display("%s: %0d pixels, PSNR of RoBA result against exact result %0.2f dB", name, npix, psnr);
    checks++;
    if (psnr < 15.0) begin
      failures++;
      $display("%s: PSNR too low", name);
    end
  endtask

  initial begin
    for (int r = 0; r < S; r++)
      for (int c = 0; c < S; c++)
        img[r][c] = ((r * 4 + c * 2) + ((r / 8 + c / 8) % 2) * 40 + int'($urandom_range(0, 15))) % 128;
    run_filter("smoothing", ksm, 48);
    run_filter("sharpening", ksh, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
