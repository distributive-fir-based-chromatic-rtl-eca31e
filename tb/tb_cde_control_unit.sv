// tb_cde_control_unit: routing of folded sums into level groups.
// Each input xs[k] carries its own tap index, so every routed slot reveals
// which tap landed there. Checked for a made-up level table (N = 41,
// DELTA = 4, every level present several times, some levels absent from one
// part) and for the real and imaginary tables of the full N = 901 filter:
// slot j inside group g must hold a tap whose level is group_level(g), every
// tap appears exactly once, and the tail holds the null taps.
module tb_cde_control_unit;
  import cde_pkg::*;

  function automatic lvl_tab_t test_levels(int nh);
    lvl_tab_t q;
    for (int k = 0; k < MAX_HALF; k++) q[k] = lvl_t'((k < nh) ? ((k * 7 + 3) % 9) - 4 : 0);
    q[0] = 0;
    return q;
  endfunction

  localparam int       NA = 41;
  localparam int       HA = (NA - 1) / 2 + 1;
  localparam lvl_tab_t QA = test_levels(HA);
  localparam int       NB = 901;
  localparam int       HB = (NB - 1) / 2 + 1;
  localparam lvl_tab_t QBR = coef_levels(NB, 4, 1'b0);
  localparam lvl_tab_t QBI = coef_levels(NB, 4, 1'b1);

  cacc_t xa [HA], ra [HA];
  cacc_t xb [HB], rbr [HB], rbi [HB];
  int checks = 0;
  int failures = 0;

  cde_control_unit #(.N(NA), .DELTA(4), .Q(QA)) dut_a (.xs(xa), .routed(ra));
  cde_control_unit #(.N(NB), .DELTA(4), .Q(QBR)) dut_br (.xs(xb), .routed(rbr));
  cde_control_unit #(.N(NB), .DELTA(4), .Q(QBI)) dut_bi (.xs(xb), .routed(rbi));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // expected: for each level in group order, the taps in ascending index
  task automatic check_routing(lvl_tab_t q, int nh, int delta, cacc_t r []);
    int j;
    int lev;
    bit seen [];
    seen = new[nh];
    j = 0;
    for (int g = 0; g <= 2 * delta; g++) begin
      lev = (g == 2 * delta) ? 0 : ((g % 2 == 0) ? g / 2 + 1 : -(g / 2 + 1));
      for (int k = 0; k < nh; k++) begin
        if (q[k] == lev) begin
          check(r[j].re == W_ACC'(k) && r[j].im == W_ACC'(-k),
                $sformatf("slot %0d: tap %0d expected (level %0d), got %0d", j, k, lev, r[j].re));
          seen[k] = 1'b1;
          j++;
        end
      end
    end
    check(j == nh, "every slot accounted for");
    foreach (seen[k]) check(seen[k], $sformatf("tap %0d routed", k));
  endtask

  initial begin
    cacc_t tmp [];
    for (int k = 0; k < HA; k++) xa[k] = cacc_t'{re: W_ACC'(k), im: W_ACC'(-k)};
    for (int k = 0; k < HB; k++) xb[k] = cacc_t'{re: W_ACC'(k), im: W_ACC'(-k)};
    #1;
    tmp = new[HA];
    foreach (tmp[i]) tmp[i] = ra[i];
    check_routing(QA, HA, 4, tmp);
    tmp = new[HB];
    foreach (tmp[i]) tmp[i] = rbr[i];
    check_routing(QBR, HB, 4, tmp);
    foreach (tmp[i]) tmp[i] = rbi[i];
    check_routing(QBI, HB, 4, tmp);
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
