// tb_sym_preadd: random windows at the full N = 901; every folded sum
// xs[k] = x[k] + x[N-1-k] and the centre xs[M] = x[M] is compared with
// values computed here in 64-bit integers.
module tb_sym_preadd;
  import cde_pkg::*;
  import cde_ref_pkg::*;

  localparam int N = 901;
  localparam int M = (N - 1) / 2;

  cin_t  x_win [N];
  cacc_t xs    [M+1];
  int checks = 0;
  int failures = 0;

  sym_preadd #(.N(N)) dut (.x_win(x_win), .xs(xs));

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int k = 0; k < N; k++) x_win[k] = (t == 0) ? cin_t'{re: -128, im: 127} : rand_sample();
      #1;
      for (int k = 0; k <= M; k++) begin
        longint er;
        longint ei;
        er = longint'(x_win[k].re) + ((k < M) ? longint'(x_win[N-1-k].re) : 0);
        ei = longint'(x_win[k].im) + ((k < M) ? longint'(x_win[N-1-k].im) : 0);
        checks++;
        if (longint'(xs[k].re) != er || longint'(xs[k].im) != ei) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d k=%0d got %0d,%0d exp %0d,%0d", t, k, xs[k].re, xs[k].im, er, ei);
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
