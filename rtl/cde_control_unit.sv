// cde_control_unit: routing engine of the distributive FIR-CDE.
//
// Each symmetric sum xs[k] has to be added into the set of the quantization
// level its coefficient part was given (real part for one instance,
// imaginary part for the other). The unit reorders the M+1 sums so that the
// members of each set sit next to each other:
//   routed = { set(+1), set(-1), set(+2), set(-2), ..., set(+DELTA),
//              set(-DELTA), null taps }
// Group sizes and offsets come from cde_pkg::group_count / group_offset on
// the same level table, so the summation blocks know which slice to add. The
// null (level 0) taps end up at the tail and are read by nobody.
// Because the amount of dispersion is fixed, the routing is fixed wiring
// worked out at elaboration: no logic, no arithmetic, as the original
// architecture assumes. Purely combinational.
module cde_control_unit
  import cde_pkg::*;
#(
  parameter int       N     = 901,
  parameter int       DELTA = 4,
  parameter lvl_tab_t Q     = coef_levels(N, DELTA, 1'b0)
) (
  input  cacc_t xs     [(N-1)/2+1],
  output cacc_t routed [(N-1)/2+1]
);

  localparam int       NH   = (N - 1) / 2 + 1;
  localparam idx_tab_t PERM = route_perm(Q, NH, DELTA);

  initial assert (levels_ok(Q, NH, DELTA))
    else $error("cde_control_unit: a level lies outside -DELTA..DELTA");

  for (genvar j = 0; j < NH; j++) begin : g_route
    assign routed[j] = xs[int'(PERM[j])];
  end

endmodule
