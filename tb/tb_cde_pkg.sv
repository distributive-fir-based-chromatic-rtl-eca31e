// tb_cde_pkg: checks the elaboration-time tables of cde_pkg.
//  * coef_levels against an independent evaluation of the closed-form taps
//    over the whole N-tap filter (both halves) with its own rounding;
//  * the level tables at N = 901: every level inside -DELTA..DELTA, the
//    largest part reaching +-DELTA;
//  * route_perm is a permutation whose groups appear in order +1,-1,+2,...
//    with the sizes group_count gives;
//  * csd_digit rebuilds every value 1..255, has no two adjacent non-zero
//    digits, and gives the shift/adder counts of the multiplierless
//    design: 4(DELTA-1) SAMs need 4/12/36 shifts and 0/4/16 adders for
//    DELTA = 2/4/8 (a digit of weight 1, i.e. c_m bit 2^0, needs no shift).
module tb_cde_pkg;
  import cde_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int my_round(real v);
    real a;
    a = (v < 0.0) ? -v : v;
    return (v < 0.0) ? -int'($floor(a + 0.5)) : int'($floor(a + 0.5));
  endfunction

  task automatic check_levels(int n, int delta);
    lvl_tab_t qr;
    lvl_tab_t qi;
    real      a;
    real      ph;
    real      mx;
    int       nh;
    int       er;
    int       ei;
    int       peak;
    qr = coef_levels(n, delta, 1'b0);
    qi = coef_levels(n, delta, 1'b1);
    nh = (n - 1) / 2 + 1;
    a  = 400.0 / (2.0 * 3.141592653589793 * 20.4 * 4000.0);
    mx = 0.0;
    for (int k = 0; k < n; k++) begin
      ph = 3.141592653589793 / 4.0 - 3.141592653589793 * a * real'((k - (n - 1) / 2) ** 2);
      if ($cos(ph) > mx) mx = $cos(ph);
      if (-$cos(ph) > mx) mx = -$cos(ph);
      if ($sin(ph) > mx) mx = $sin(ph);
      if (-$sin(ph) > mx) mx = -$sin(ph);
    end
    peak = 0;
    for (int k = 0; k < nh; k++) begin
      ph = 3.141592653589793 / 4.0 - 3.141592653589793 * a * real'((k - (n - 1) / 2) ** 2);
      er = my_round(real'(delta) * $cos(ph) / mx);
      ei = my_round(real'(delta) * $sin(ph) / mx);
      check(qr[k] == er && qi[k] == ei,
            $sformatf("N=%0d D=%0d tap %0d: got %0d,%0d expected %0d,%0d", n, delta, k, qr[k], qi[k], er, ei));
      if (qr[k] > peak) peak = qr[k];
      if (-qr[k] > peak) peak = -qr[k];
      if (qi[k] > peak) peak = qi[k];
      if (-qi[k] > peak) peak = -qi[k];
    end
    check(levels_ok(qr, nh, delta) && levels_ok(qi, nh, delta), "levels in range");
    check(peak == delta, $sformatf("peak level %0d reaches DELTA %0d", peak, delta));
    check(qr[nh] == 0 && qi[MAX_HALF-1] == 0, "unused entries zero");
  endtask

  task automatic check_route(lvl_tab_t q, int nh, int delta);
    idx_tab_t perm;
    bit       seen [MAX_HALF];
    int       j;
    int       total;
    perm = route_perm(q, nh, delta);
    foreach (seen[i]) seen[i] = 1'b0;
    for (int i = 0; i < nh; i++) begin
      check(perm[i] >= 0 && perm[i] < nh && !seen[perm[i]], $sformatf("perm slot %0d", i));
      if (perm[i] >= 0 && perm[i] < nh) seen[perm[i]] = 1'b1;
    end
    total = 0;
    for (int g = 0; g < 2 * delta; g++) begin
      check(group_offset(q, nh, g) == total, $sformatf("offset of group %0d", g));
      for (j = 0; j < group_count(q, nh, g); j++)
        check(q[perm[total+j]] == group_level(g), $sformatf("group %0d member %0d", g, j));
      total += group_count(q, nh, g);
    end
    check(total + level_count(q, nh, 0) == nh, "all taps routed");
    for (int i = total; i < nh; i++) check(q[perm[i]] == 0, "tail holds null taps");
  endtask

  function automatic int sam_shifts(int delta);
    int s;
    s = 0;
    // digits at weight 1 (position log2(delta)) need no shift
    for (int m = 1; m < delta; m++)
      for (int b = 0; b < 12; b++)
        if (csd_digit(m, b) != 0 && (1 << b) != delta) s += 4;
    return s;
  endfunction

  function automatic int sam_adds(int delta);
    int s;
    s = 0;
    for (int m = 1; m < delta; m++) s += 4 * (csd_weight(m) - 1);
    return s;
  endfunction

  initial begin
    check_levels(901, 4);
    check_levels(901, 2);
    check_levels(901, 8);
    check_levels(31, 4);
    check_route(coef_levels(901, 4, 1'b0), 451, 4);
    check_route(coef_levels(901, 4, 1'b1), 451, 4);
    check_route(coef_levels(21, 2, 1'b0), 11, 2);
    for (int v = 1; v < 256; v++) begin
      int rebuilt;
      bit adjacent;
      rebuilt = 0;
      adjacent = 1'b0;
      for (int b = 0; b < 12; b++) begin
        rebuilt += csd_digit(v, b) * (1 << b);
        if (b > 0 && csd_digit(v, b) != 0 && csd_digit(v, b - 1) != 0) adjacent = 1'b1;
      end
      check(rebuilt == v && !adjacent, $sformatf("CSD of %0d", v));
    end
    check(csd_weight(3) == 2 && csd_weight(7) == 2 && csd_weight(5) == 2 && csd_weight(4) == 1,
          "CSD weights of 3, 4, 5, 7");
    check(sam_shifts(2) == 4 && sam_shifts(4) == 12 && sam_shifts(8) == 36, "SAM shifts for DELTA 2, 4, 8");
    check(sam_adds(2) == 0 && sam_adds(4) == 4 && sam_adds(8) == 16, "SAM adders for DELTA 2, 4, 8");
    $display("level multiplicities, N=901 DELTA=4: zero taps real %0d imag %0d",
             level_count(coef_levels(901, 4, 1'b0), 451, 0), level_count(coef_levels(901, 4, 1'b1), 451, 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
