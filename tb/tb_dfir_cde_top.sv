// tb_dfir_cde_top: end-to-end test of the dual-polarization equalizer at
// N = 101, DELTA = 4, NP = 8 (both polarizations, shift-and-add form).
// Both streams are compared sample by sample with the direct-form quantized
// FIR. The run makes each mechanism of the design happen and counts it:
//   impulse   - centre-tap response latency, worst case
//               ceil((M + 1/2)/NP) + 1 clocks
//   stall     - cycles with in_valid low (buffer holds, no output)
//   reset     - a reset in the middle of the stream (history cleared)
//   null taps - outputs computed with taps quantized to zero (skipped)
//   SAM add   - level 3 present, the one level whose multiplier needs an adder
//   pol X / Y - output blocks checked on each polarization
// A mechanism that never happened counts as a failure.
module tb_dfir_cde_top;
  import cde_pkg::*;
  import cde_ref_pkg::*;

  localparam int       N  = 101;
  localparam int       D  = 4;
  localparam int       NP = 8;
  localparam int       M  = (N - 1) / 2;
  localparam lvl_tab_t QR = coef_levels(N, D, 1'b0);
  localparam lvl_tab_t QI = coef_levels(N, D, 1'b1);

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  cin_t  x_in [NP], y_in [NP];
  logic  out_valid;
  cacc_t x_out [NP], y_out [NP];
  int checks = 0;
  int failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  dfir_cde_top #(.N(N), .DELTA(D), .NP(NP)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .y_in(y_in),
    .out_valid(out_valid), .x_out(x_out), .y_out(y_out));

  longint hx_re [$], hx_im [$], hy_re [$], hy_im [$];

  function automatic cacc_t expect_at(longint sre [$], longint sim [$], int idx);
    longint wr [];
    longint wi [];
    wr = new[N];
    wi = new[N];
    for (int k = 0; k < N; k++) begin
      wr[k] = (idx - k >= 0) ? sre[idx-k] : 0;
      wi[k] = (idx - k >= 0) ? sim[idx-k] : 0;
    end
    return ref_fir(QR, QI, N, wr, wi);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  int n_impulse = 0, n_stall = 0, n_reset = 0, n_null = 0, n_sam_add = 0, n_pol_x = 0, n_pol_y = 0;

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    in_valid = 1'b0;
    hx_re.delete(); hx_im.delete(); hy_re.delete(); hy_im.delete();
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    int start;
    int lat;
    foreach (x_in[i]) x_in[i] = '0;
    foreach (y_in[i]) y_in[i] = '0;
    // impulse on Y at the last block position: the worst-case latency
    do_reset();
    lat = -1;
    for (int b = 0; b < 20 && lat < 0; b++) begin
      @(negedge clk);
      in_valid = 1'b1;
      foreach (x_in[i]) x_in[i] = '0;
      foreach (y_in[i]) y_in[i] = (b == 0 && i == NP - 1) ? cin_t'{re: 0, im: -50} : cin_t'('0);
      if (b == 0) start = cycle;
      @(posedge clk);
      #1;
      if (out_valid && (NP - 1 + M) / NP == b) begin
        lat = cycle - start;
        n_impulse++;
        check(y_out[(NP - 1 + M) % NP] == cacc_t'{re: W_ACC'(50 * QI[M]), im: W_ACC'(-50 * QR[M])},
              "centre-tap response");
        check(x_out[(NP - 1 + M) % NP] == '0, "no cross-talk into X");
      end
    end
    check(lat == (2 * M + 1 + 2 * NP - 1) / (2 * NP) + 1,
          $sformatf("worst-case latency %0d clocks, expected ceil((M+1/2)/NP)+1 = %0d",
                    lat, (2 * M + 1 + 2 * NP - 1) / (2 * NP) + 1));
    // random streams with gaps and a reset in the middle
    do_reset();
    for (int t = 0; t < 120; t++) begin
      bit v;
      int base;
      if (t == 60) begin
        do_reset();
        n_reset++;
      end
      @(negedge clk);
      v = ($urandom_range(5, 0) != 0);
      in_valid = v;
      foreach (x_in[i]) x_in[i] = rand_sample();
      foreach (y_in[i]) y_in[i] = rand_sample();
      if (v) begin
        foreach (x_in[i]) begin hx_re.push_back(x_in[i].re); hx_im.push_back(x_in[i].im); end
        foreach (y_in[i]) begin hy_re.push_back(y_in[i].re); hy_im.push_back(y_in[i].im); end
      end else n_stall++;
      base = hx_re.size() - NP;
      @(posedge clk);
      #1;
      check(out_valid == v, $sformatf("out_valid at step %0d", t));
      if (v) begin
        for (int p = 0; p < NP; p++) begin
          check(x_out[p] == expect_at(hx_re, hx_im, base + p), $sformatf("X step %0d lane %0d", t, p));
          check(y_out[p] == expect_at(hy_re, hy_im, base + p), $sformatf("Y step %0d lane %0d", t, p));
        end
        n_pol_x++;
        n_pol_y++;
        if (level_count(QR, M + 1, 0) + level_count(QI, M + 1, 0) > 0) n_null++;
        if (level_count(QR, M + 1, 3) + level_count(QR, M + 1, -3) +
            level_count(QI, M + 1, 3) + level_count(QI, M + 1, -3) > 0) n_sam_add++;
      end
    end
    $display("mechanisms: impulse=%0d stall=%0d reset=%0d null_taps=%0d sam_add=%0d pol_x=%0d pol_y=%0d",
             n_impulse, n_stall, n_reset, n_null, n_sam_add, n_pol_x, n_pol_y);
    $display("worst-case latency %0d clocks", lat);
    check(n_impulse > 0, "impulse latency measured");
    check(n_stall > 0, "stall happened");
    check(n_reset > 0, "mid-stream reset happened");
    check(n_null > 0, "null taps present");
    check(n_sam_add > 0, "SAM with adder used");
    check(n_pol_x > 0 && n_pol_y > 0, "both polarizations checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
