// dfir_cde_lane: one output of the distributive FIR chromatic dispersion
// equalizer (D-FIR-CDE, or MD-FIR-CDE when MULTIPLIERLESS = 1).
//
// A direct N-tap complex FIR, y(n) = sum_k x(n-k) c(k), is rebuilt around
// quantized coefficients whose real and imaginary parts take only the values
// m/DELTA, m = -DELTA..DELTA. Per output sample:
//   1. sym_preadd folds the symmetric window: xs[k], k = 0..M.
//   2. Two Control Units (one for the real, one for the imaginary coefficient
//      parts) route xs into the sets of equal level.
//   3. 4*DELTA complex summation blocks add each set; 2*DELTA subtractions
//      form S_m = sum(set +m) - sum(set -m) for the real and imaginary parts.
//   4. Each S_m is multiplied once by its level m (sam_mult), then summed
//      over m: y_cr = sum_m m*S_m^cr, y_ci = sum_m m*S_m^ci (both complex).
//   5. y = y_cr + j*y_ci, i.e. Re = Re(y_cr) - Im(y_ci),
//      Im = Im(y_cr) + Re(y_ci).
// So the number of multiplications depends on DELTA only, not on N.
// Null-level taps are never added at all.
// Scaling: the result is DELTA times the quantized-filter output (levels are
// integers m instead of m/DELTA); nothing is rounded.
// Timing: steps 1-5 are one combinational stage; y is registered when en is
// high, so an output appears one clock after its window is presented.
// Widths (8-bit in, 24-bit elsewhere) and the output register are this
// design's choices.
module dfir_cde_lane
  import cde_pkg::*;
#(
  parameter int       N              = 901,
  parameter int       DELTA          = 4,
  parameter bit       MULTIPLIERLESS = 1'b1,
  parameter lvl_tab_t QR             = coef_levels(N, DELTA, 1'b0),
  parameter lvl_tab_t QI             = coef_levels(N, DELTA, 1'b1)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  cin_t  x_win [N],
  output cacc_t y
);

  localparam int       NH   = (N - 1) / 2 + 1;  // M + 1 folded taps
  localparam off_tab_t OFFR = group_offsets(QR, NH, DELTA);
  localparam off_tab_t OFFI = group_offsets(QI, NH, DELTA);

  cacc_t xs   [NH];
  cacc_t rt_r [NH];  // routed by real-part level
  cacc_t rt_i [NH];  // routed by imaginary-part level

  sym_preadd #(.N(N)) u_preadd (.x_win(x_win), .xs(xs));

  cde_control_unit #(.N(N), .DELTA(DELTA), .Q(QR)) u_cu_r (.xs(xs), .routed(rt_r));
  cde_control_unit #(.N(N), .DELTA(DELTA), .Q(QI)) u_cu_i (.xs(xs), .routed(rt_i));

  // group sums: index 2*(m-1) is set +m, 2*(m-1)+1 is set -m
  cacc_t gsum_r [2*DELTA];
  cacc_t gsum_i [2*DELTA];
  cacc_t prod_r [DELTA];  // m * S_m^cr
  cacc_t prod_i [DELTA];  // m * S_m^ci

  for (genvar g = 0; g < 2 * DELTA; g++) begin : g_set
    csum_tree #(
      .NTOT(NH), .OFF(int'(OFFR[g])), .NIN(int'(OFFR[g+1]) - int'(OFFR[g]))
    ) u_sum_r (.din(rt_r), .sum(gsum_r[g]));
    csum_tree #(
      .NTOT(NH), .OFF(int'(OFFI[g])), .NIN(int'(OFFI[g+1]) - int'(OFFI[g]))
    ) u_sum_i (.din(rt_i), .sum(gsum_i[g]));
  end

  for (genvar m = 1; m <= DELTA; m++) begin : g_lvl
    cacc_t s_r;
    cacc_t s_i;
    assign s_r = csub(gsum_r[2*(m-1)], gsum_r[2*(m-1)+1]);
    assign s_i = csub(gsum_i[2*(m-1)], gsum_i[2*(m-1)+1]);
    // c_DELTA = 1 needs no multiplier: always a shift
    sam_mult #(.M_LEVEL(m), .MULTIPLIERLESS(MULTIPLIERLESS || (m == DELTA)))
      u_mul_r (.s(s_r), .p(prod_r[m-1]));
    sam_mult #(.M_LEVEL(m), .MULTIPLIERLESS(MULTIPLIERLESS || (m == DELTA)))
      u_mul_i (.s(s_i), .p(prod_i[m-1]));
  end

  cacc_t y_cr;
  cacc_t y_ci;
  cacc_t y_d;

  always_comb begin
    y_cr = prod_r[0];
    y_ci = prod_i[0];
    for (int m = 1; m < DELTA; m++) begin
      y_cr = cadd(y_cr, prod_r[m]);
      y_ci = cadd(y_ci, prod_i[m]);
    end
    y_d.re = y_cr.re - y_ci.im;
    y_d.im = y_cr.im + y_ci.re;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= y_d;
  end

endmodule
