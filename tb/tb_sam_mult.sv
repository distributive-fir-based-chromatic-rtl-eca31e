// tb_sam_mult: shift-and-add multipliers for every level 1..8 and a few
// larger ones (11, 23, 45), plus the real-multiplier form for level 3 and 7.
// Random complex inputs of up to 18 bits, products compared with m*s.
module tb_sam_mult;
  import cde_pkg::*;

  localparam int NL = 13;
  localparam int LV [NL] = '{1, 2, 3, 4, 5, 6, 7, 8, 11, 23, 45, 3, 7};
  localparam bit ML [NL] = '{1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 0};

  cacc_t s;
  cacc_t p [NL];
  int checks = 0;
  int failures = 0;

  for (genvar i = 0; i < NL; i++) begin : g_dut
    sam_mult #(.M_LEVEL(LV[i]), .MULTIPLIERLESS(ML[i])) dut (.s(s), .p(p[i]));
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      s.re = W_ACC'($signed(18'($urandom)));
      s.im = W_ACC'($signed(18'($urandom)));
      if (t == 0) s = cacc_t'{re: -131072, im: 131071};
      #1;
      for (int i = 0; i < NL; i++) begin
        checks++;
        if (longint'(p[i].re) != longint'(s.re) * LV[i] || longint'(p[i].im) != longint'(s.im) * LV[i]) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d: s=%0d,%0d p=%0d,%0d", LV[i], s.re, s.im, p[i].re, p[i].im);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
