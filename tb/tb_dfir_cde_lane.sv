// tb_dfir_cde_lane: one distributive FIR lane against the direct-form
// quantized FIR of cde_ref_pkg.
//  * dut_full: the full N = 901, DELTA = 4 multiplierless lane with the
//    4000 km coefficient tables;
//  * dut_rm:   N = 61, DELTA = 8, real multipliers (D-FIR-CDE form);
//  * dut_sm:   N = 15, DELTA = 2, a made-up table with every level present.
// Random windows (first one at full scale, -128 everywhere, to show that no
// node overflows); each result must appear exactly one clock after the
// window, and must hold while en is low.
module tb_dfir_cde_lane;
  import cde_pkg::*;
  import cde_ref_pkg::*;

  function automatic lvl_tab_t small_levels(int nh);
    lvl_tab_t q;
    for (int k = 0; k < MAX_HALF; k++) q[k] = lvl_t'((k < nh) ? ((k * 3 + 1) % 5) - 2 : 0);
    return q;
  endfunction

  function automatic lvl_tab_t other_levels();
    lvl_tab_t q;
    q = '0;
    q[0] = 2;  q[1] = -2; q[2] = 1; q[3] = -1;
    q[4] = 0;  q[5] = 2;  q[6] = -1; q[7] = 1;
    return q;
  endfunction

  localparam int       N1 = 901;
  localparam int       N2 = 61;
  localparam int       N3 = 15;
  localparam lvl_tab_t Q1R = coef_levels(N1, 4, 1'b0);
  localparam lvl_tab_t Q1I = coef_levels(N1, 4, 1'b1);
  localparam lvl_tab_t Q2R = coef_levels(N2, 8, 1'b0);
  localparam lvl_tab_t Q2I = coef_levels(N2, 8, 1'b1);
  localparam lvl_tab_t Q3R = small_levels(8);
  localparam lvl_tab_t Q3I = other_levels();

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  en = 1'b0;
  cin_t  w1 [N1];
  cin_t  w2 [N2];
  cin_t  w3 [N3];
  cacc_t y1, y2, y3;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  dfir_cde_lane #(.N(N1), .DELTA(4)) dut_full (.clk(clk), .rst_n(rst_n), .en(en), .x_win(w1), .y(y1));
  dfir_cde_lane #(.N(N2), .DELTA(8), .MULTIPLIERLESS(1'b0), .QR(Q2R), .QI(Q2I))
    dut_rm (.clk(clk), .rst_n(rst_n), .en(en), .x_win(w2), .y(y2));
  dfir_cde_lane #(.N(N3), .DELTA(2), .QR(Q3R), .QI(Q3I))
    dut_sm (.clk(clk), .rst_n(rst_n), .en(en), .x_win(w3), .y(y3));

  task automatic cmp(cacc_t got, cacc_t exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d,%0d exp %0d,%0d", what, got.re, got.im, exp.re, exp.im);
    end
  endtask

  function automatic cacc_t ref_of(lvl_tab_t qr, lvl_tab_t qi, cin_t w []);
    longint hr [];
    longint hi [];
    hr = new[w.size()];
    hi = new[w.size()];
    foreach (w[k]) begin
      hr[k] = w[k].re;
      hi[k] = w[k].im;
    end
    return ref_fir(qr, qi, w.size(), hr, hi);
  endfunction

  cacc_t e1, e2, e3;

  initial begin
    cin_t tmp [];
    foreach (w1[k]) w1[k] = '0;
    foreach (w2[k]) w2[k] = '0;
    foreach (w3[k]) w3[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    cmp(y1, '0, "reset value");
    for (int t = 0; t < 30; t++) begin
      @(negedge clk);
      en = (t % 5 != 4);
      foreach (w1[k]) w1[k] = (t == 0) ? cin_t'{re: -128, im: -128} : rand_sample();
      foreach (w2[k]) w2[k] = (t == 0) ? cin_t'{re: -128, im: 127} : rand_sample();
      foreach (w3[k]) w3[k] = rand_sample();
      if (en) begin
        tmp = new[N1];
        foreach (tmp[k]) tmp[k] = w1[k];
        e1 = ref_of(Q1R, Q1I, tmp);
        tmp = new[N2];
        foreach (tmp[k]) tmp[k] = w2[k];
        e2 = ref_of(Q2R, Q2I, tmp);
        tmp = new[N3];
        foreach (tmp[k]) tmp[k] = w3[k];
        e3 = ref_of(Q3R, Q3I, tmp);
      end
      // output still shows the previous result until the clock edge
      @(posedge clk);
      #1;
      cmp(y1, e1, $sformatf("N=901 step %0d", t));
      cmp(y2, e2, $sformatf("N=61 RM step %0d", t));
      cmp(y3, e3, $sformatf("N=15 step %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
