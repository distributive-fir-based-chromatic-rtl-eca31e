// tb_dfir_cde_parallel: the parallel equalizer of one polarization against
// the direct-form quantized FIR, sample by sample.
//  * dut_a: N = 61, DELTA = 4, NP = 4, shift-and-add multipliers;
//  * dut_b: N = 9, DELTA = 2, NP = 8 (block longer than the filter),
//    real multipliers.
// Phase 1 sends one impulse at each block position p0 and measures, in
// clocks, when the output whose centre tap is the impulse appears; it must
// be floor((p0 + M)/NP) + 1, and the worst case ceil((M + 1/2)/NP) + 1, the
// latency estimate of the architecture. Phase 2 streams random blocks with
// gaps in in_valid; every output block must come exactly one clock after
// its input block and match the reference for all NP samples.
module tb_dfir_cde_parallel;
  import cde_pkg::*;
  import cde_ref_pkg::*;

  localparam int       NA  = 61;
  localparam int       DA  = 4;
  localparam int       PA  = 4;
  localparam int       NB  = 9;
  localparam int       DB  = 2;
  localparam int       PB  = 8;
  localparam lvl_tab_t QAR = coef_levels(NA, DA, 1'b0);
  localparam lvl_tab_t QAI = coef_levels(NA, DA, 1'b1);
  localparam lvl_tab_t QBR = coef_levels(NB, DB, 1'b0);
  localparam lvl_tab_t QBI = coef_levels(NB, DB, 1'b1);

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  cin_t  xa [PA];
  cin_t  xb [PB];
  logic  va, vb;
  cacc_t ya [PA];
  cacc_t yb [PB];
  int checks = 0;
  int failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  dfir_cde_parallel #(.N(NA), .DELTA(DA), .NP(PA)) dut_a (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(xa), .out_valid(va), .y_out(ya));
  dfir_cde_parallel #(.N(NB), .DELTA(DB), .NP(PB), .MULTIPLIERLESS(1'b0)) dut_b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(xb), .out_valid(vb), .y_out(yb));

  // every accepted sample since reset, oldest first
  longint ha_re [$], ha_im [$], hb_re [$], hb_im [$];

  function automatic cacc_t expect_at(lvl_tab_t qr, lvl_tab_t qi, int n_taps,
                                      longint sre [$], longint sim [$], int idx);
    longint wr [];
    longint wi [];
    wr = new[n_taps];
    wi = new[n_taps];
    for (int k = 0; k < n_taps; k++) begin
      wr[k] = (idx - k >= 0) ? sre[idx-k] : 0;
      wi[k] = (idx - k >= 0) ? sim[idx-k] : 0;
    end
    return ref_fir(qr, qi, n_taps, wr, wi);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    in_valid = 1'b0;
    ha_re.delete(); ha_im.delete(); hb_re.delete(); hb_im.delete();
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // impulse at block position p0 of dut_a; returns clocks from its block
  // to the output carrying the centre-tap response
  task automatic impulse_latency(int p0, output int lat);
    int start;
    int target;  // sample index of the output using the impulse as centre
    int got;
    do_reset();
    target = p0 + (NA - 1) / 2;
    got = -1;
    for (int b = 0; b < 40 && got < 0; b++) begin
      @(negedge clk);
      in_valid = 1'b1;
      foreach (xa[i]) xa[i] = (b == 0 && i == p0) ? cin_t'{re: 100, im: 0} : cin_t'('0);
      foreach (xb[i]) xb[i] = '0;
      if (b == 0) start = cycle;
      @(posedge clk);
      #1;
      if (va && target / PA == b) begin
        got = cycle - start;
        check(ya[target % PA].re == W_ACC'(100 * QAR[(NA - 1) / 2]) &&
              ya[target % PA].im == W_ACC'(100 * QAI[(NA - 1) / 2]), "centre-tap response value");
      end
    end
    lat = got;
  endtask

  int lat;
  int worst;
  bit prev_v;
  int stalls = 0;
  int blocks = 0;

  initial begin
    foreach (xa[i]) xa[i] = '0;
    foreach (xb[i]) xb[i] = '0;
    // phase 1: latency
    worst = 0;
    for (int p0 = 0; p0 < PA; p0++) begin
      impulse_latency(p0, lat);
      check(lat == ((NA - 1) / 2 + p0) / PA + 1,
            $sformatf("latency for position %0d: %0d clocks, expected %0d", p0, lat, ((NA - 1) / 2 + p0) / PA + 1));
      if (lat > worst) worst = lat;
    end
    // ceil((M + 1/2)/NP) + 1 = ceil((2M + 1)/(2 NP)) + 1
    check(worst == (NA + 2 * PA - 1) / (2 * PA) + 1, $sformatf("worst-case latency %0d", worst));
    // phase 2: random stream
    do_reset();
    prev_v = 1'b0;
    for (int t = 0; t < 80; t++) begin
      bit v;
      int base_a;
      int base_b;
      @(negedge clk);
      v = ($urandom_range(4, 0) != 0);
      in_valid = v;
      foreach (xa[i]) xa[i] = rand_sample();
      foreach (xb[i]) xb[i] = rand_sample();
      if (v) begin
        foreach (xa[i]) begin ha_re.push_back(xa[i].re); ha_im.push_back(xa[i].im); end
        foreach (xb[i]) begin hb_re.push_back(xb[i].re); hb_im.push_back(xb[i].im); end
      end else stalls++;
      base_a = ha_re.size() - PA;
      base_b = hb_re.size() - PB;
      // before the edge, out_valid still describes the previous block
      #1 check(va == prev_v && vb == prev_v, $sformatf("out_valid before edge at step %0d", t));
      prev_v = v;
      @(posedge clk);
      #1;
      check(va == v && vb == v, $sformatf("out_valid at step %0d", t));
      if (v) begin
        blocks++;
        for (int p = 0; p < PA; p++)
          check(ya[p] == expect_at(QAR, QAI, NA, ha_re, ha_im, base_a + p),
                $sformatf("dut_a step %0d lane %0d", t, p));
        for (int p = 0; p < PB; p++)
          check(yb[p] == expect_at(QBR, QBI, NB, hb_re, hb_im, base_b + p),
                $sformatf("dut_b step %0d lane %0d", t, p));
      end
    end
    check(stalls > 0 && blocks > 0, "stream had both gaps and blocks");
    $display("worst latency %0d clocks, %0d blocks, %0d gaps", worst, blocks, stalls);
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
