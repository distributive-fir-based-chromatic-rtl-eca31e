// sym_preadd: symmetric pre-adder of the linear-phase CD equalizer.
//
// The CD-compensating taps are symmetric about the centre, c(k) = c(N-1-k),
// so the window of N samples is folded before any coefficient is applied:
//   xs[k] = x(n-k) + x(n-N+k+1),  k = 0..M-1,   M = (N-1)/2
//   xs[M] = x(n-M)                 (centre tap, no partner)
// This takes M complex adders and halves the number of coefficient terms.
// Interface: x_win[k] = x(n-k), newest sample first; xs[k] as above, sign
// extended to the accumulator width. Purely combinational. N must be odd, as
// in the original design; an even N is rejected by an assertion.
module sym_preadd
  import cde_pkg::*;
#(
  parameter int N = 901
) (
  input  cin_t  x_win [N],
  output cacc_t xs    [(N-1)/2+1]
);

  localparam int M = (N - 1) / 2;

  initial assert (N % 2 == 1 && N >= 3)
    else $error("sym_preadd: N must be odd and at least 3");

  always_comb begin
    for (int k = 0; k < M; k++) xs[k] = cadd(cext(x_win[k]), cext(x_win[N-1-k]));
    xs[M] = cext(x_win[M]);
  end

endmodule
