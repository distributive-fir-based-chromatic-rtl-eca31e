// tb_csum_tree: complex adder trees of several sizes over one routed array
// of 40 values: a 13-member slice at offset 3, a 1-member slice, an empty
// set (must give zero), a full 40-member set and a power-of-two slice.
// Random inputs, sums compared with a plain loop in 64-bit integers.
module tb_csum_tree;
  import cde_pkg::*;

  localparam int NT = 40;
  localparam int NS = 5;
  localparam int OFFS [NS] = '{3, 39, 10, 0, 8};
  localparam int NINS [NS] = '{13, 1, 0, 40, 16};

  cacc_t din [NT];
  cacc_t sum [NS];
  int checks = 0;
  int failures = 0;

  for (genvar i = 0; i < NS; i++) begin : g_dut
    csum_tree #(.NTOT(NT), .OFF(OFFS[i]), .NIN(NINS[i])) dut (.din(din), .sum(sum[i]));
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < NT; k++) begin
        din[k].re = W_ACC'($signed(18'($urandom)));
        din[k].im = W_ACC'($signed(18'($urandom)));
      end
      #1;
      for (int i = 0; i < NS; i++) begin
        longint er;
        longint ei;
        er = 0;
        ei = 0;
        for (int k = OFFS[i]; k < OFFS[i] + NINS[i]; k++) begin
          er += longint'(din[k].re);
          ei += longint'(din[k].im);
        end
        checks++;
        if (longint'(sum[i].re) != er || longint'(sum[i].im) != ei) begin
          failures++;
          if (failures < 10) $display("FAIL tree %0d: got %0d,%0d exp %0d,%0d", i, sum[i].re, sum[i].im, er, ei);
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
