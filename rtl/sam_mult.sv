// sam_mult: constant multiplier by a quantization level M_LEVEL.
//
// With MULTIPLIERLESS = 1 it is a shift-and-add multiplier (SAM): M_LEVEL is
// written in canonical signed digits (non-adjacent form, fewest non-zero
// digits) and the product is the signed sum of the input shifted to each
// non-zero digit, e.g. 3*s = (s << 2) - s, 7*s = (s << 3) - s. A level with a
// single digit is a pure shift. With MULTIPLIERLESS = 0 each of the two real
// parts uses a real multiplier instead (the D-FIR-CDE form).
// The level is the integer m of the coefficient value c_m = m / DELTA; the
// common 1/DELTA factor is left to the output scaling, so no bit is lost.
// Interface: complex s in, complex p = M_LEVEL * s out, both accumulator
// width, purely combinational. M_LEVEL must be 1..2^20.
module sam_mult
  import cde_pkg::*;
#(
  parameter int M_LEVEL        = 3,
  parameter bit MULTIPLIERLESS = 1'b1
) (
  input  cacc_t s,
  output cacc_t p
);

  localparam int NDIG = 22;  // digit positions examined

  initial assert (M_LEVEL >= 1 && M_LEVEL <= (1 << 20))
    else $error("sam_mult: M_LEVEL out of range");

  if (MULTIPLIERLESS) begin : g_sam
    cacc_t part [NDIG+1];  // running sum over digit positions
    assign part[0] = '0;
    for (genvar b = 0; b < NDIG; b++) begin : g_dig
      localparam int D = csd_digit(M_LEVEL, b);
      if (D > 0) begin : g_plus
        assign part[b+1] = cadd(part[b], cacc_t'{re: s.re <<< b, im: s.im <<< b});
      end else if (D < 0) begin : g_minus
        assign part[b+1] = csub(part[b], cacc_t'{re: s.re <<< b, im: s.im <<< b});
      end else begin : g_skip
        assign part[b+1] = part[b];
      end
    end
    assign p = part[NDIG];
  end else begin : g_rm
    assign p.re = s.re * W_ACC'(M_LEVEL);
    assign p.im = s.im * W_ACC'(M_LEVEL);
  end

endmodule
