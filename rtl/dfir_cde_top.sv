// dfir_cde_top: dual-polarization distributive FIR chromatic dispersion
// equalizer for a coherent receiver.
//
// Chromatic dispersion acts alike on both polarizations of a PM signal, so
// the X and Y streams each go through their own dfir_cde_parallel with the
// same quantized coefficient tables (fixed amount of dispersion, defaults for
// a 4000 km link, N = 901 taps, DELTA = 4, NP = 128 samples per clock, shift-
// and-add multipliers). One in_valid qualifies both input blocks; out_valid
// follows one clock later with both equalized blocks, each sample scaled by
// DELTA (log2(DELTA) fraction bits, 24-bit I and Q).
// Sharing one strobe between the polarizations is this design's choice.
module dfir_cde_top
  import cde_pkg::*;
#(
  parameter int N              = 901,
  parameter int DELTA          = 4,
  parameter int NP             = 128,
  parameter bit MULTIPLIERLESS = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cin_t  x_in  [NP],
  input  cin_t  y_in  [NP],
  output logic  out_valid,
  output cacc_t x_out [NP],
  output cacc_t y_out [NP]
);

  localparam lvl_tab_t QR = coef_levels(N, DELTA, 1'b0);
  localparam lvl_tab_t QI = coef_levels(N, DELTA, 1'b1);

  logic vx;
  logic vy;

  dfir_cde_parallel #(
    .N(N), .DELTA(DELTA), .NP(NP), .MULTIPLIERLESS(MULTIPLIERLESS), .QR(QR), .QI(QI)
  ) u_pol_x (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .out_valid(vx), .y_out(x_out)
  );

  dfir_cde_parallel #(
    .N(N), .DELTA(DELTA), .NP(NP), .MULTIPLIERLESS(MULTIPLIERLESS), .QR(QR), .QI(QI)
  ) u_pol_y (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(y_in), .out_valid(vy), .y_out(y_out)
  );

  assign out_valid = vx;

  // both polarizations move in lock step
  always_ff @(posedge clk) assert (vx == vy) else $error("dfir_cde_top: polarizations out of step");

endmodule
