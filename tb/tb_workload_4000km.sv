// tb_workload_4000km: the evaluated operating points of the equalizer:
// a 4000 km link, N = 901 taps, quantization DELTA = 2, 4 and 8, each run as
// a dfir_cde_parallel with NP = 2 lanes (the lane logic is identical for
// any NP; 128 lanes are too many to simulate here). Random QPSK-like and
// random full-range streams are equalized and every output is compared with
// the direct-form quantized FIR.
// It also derives, from the quantized tables, the operation counts of the
// distributive architecture per output sample: real multipliers 4(DELTA-1)
// and real additions 2*sum_m(n_m + n_-m - 2) + 8*DELTA + N - 3, and checks
// them against the published design points (4/12/28 multipliers exactly,
// about 2396/2542/2618 additions; the additions depend on how the taps fall
// on the levels and must agree within 2%).
module tb_workload_4000km;
  import cde_pkg::*;
  import cde_ref_pkg::*;

  localparam int N  = 901;
  localparam int NP = 2;
  localparam int M  = (N - 1) / 2;
  localparam int NC = 3;
  localparam int DL [NC] = '{2, 4, 8};
  localparam int RA_PUB [NC] = '{2396, 2542, 2618};
  localparam int RM_PUB [NC] = '{4, 12, 28};

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  cin_t  x_in [NP];
  logic  vo [NC];
  cacc_t y [NC][NP];
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    dfir_cde_parallel #(.N(N), .DELTA(DL[c]), .NP(NP)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .out_valid(vo[c]), .y_out(y[c]));
  end

  longint h_re [$], h_im [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  function automatic cacc_t expect_at(int delta, int idx);
    longint wr [];
    longint wi [];
    wr = new[N];
    wi = new[N];
    for (int k = 0; k < N; k++) begin
      wr[k] = (idx - k >= 0) ? h_re[idx-k] : 0;
      wi[k] = (idx - k >= 0) ? h_im[idx-k] : 0;
    end
    return ref_fir(coef_levels(N, delta, 1'b0), coef_levels(N, delta, 1'b1), N, wr, wi);
  endfunction

  function automatic int n_ra(int delta);
    lvl_tab_t qr;
    lvl_tab_t qi;
    int s;
    qr = coef_levels(N, delta, 1'b0);
    qi = coef_levels(N, delta, 1'b1);
    s = 0;
    for (int m = 1; m <= delta; m++)
      s += (level_count(qr, M + 1, m) + level_count(qr, M + 1, -m) - 2) +
           (level_count(qi, M + 1, m) + level_count(qi, M + 1, -m) - 2);
    return 2 * s + 8 * delta + N - 3;
  endfunction

  initial begin
    foreach (x_in[i]) x_in[i] = '0;
    for (int c = 0; c < NC; c++) begin
      int ra;
      ra = n_ra(DL[c]);
      $display("DELTA=%0d: %0d real multipliers, %0d real additions per sample (published %0d, %0d)",
               DL[c], 4 * (DL[c] - 1), ra, RM_PUB[c], RA_PUB[c]);
      check(4 * (DL[c] - 1) == RM_PUB[c], "multiplier count");
      check(ra * 50 >= RA_PUB[c] * 49 && ra * 50 <= RA_PUB[c] * 51, "addition count within 2%");
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 700; t++) begin
      bit v;
      int base;
      @(negedge clk);
      v = (t % 7 != 3);
      in_valid = v;
      foreach (x_in[i])
        x_in[i] = (t < 350) ? cin_t'{re: $urandom_range(1, 0) ? 8'sd90 : -8'sd90,
                                     im: $urandom_range(1, 0) ? 8'sd90 : -8'sd90}
                            : rand_sample();
      if (v) foreach (x_in[i]) begin h_re.push_back(x_in[i].re); h_im.push_back(x_in[i].im); end
      base = h_re.size() - NP;
      @(posedge clk);
      #1;
      // compare a subset of steps to keep the reference cheap
      if (v && (t % 5 == 0 || t > 440 && t < 460)) begin
        for (int c = 0; c < NC; c++)
          for (int p = 0; p < NP; p++)
            check(vo[c] && y[c][p] == expect_at(DL[c], base + p),
                  $sformatf("DELTA=%0d step %0d lane %0d", DL[c], t, p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
