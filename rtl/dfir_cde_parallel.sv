// dfir_cde_parallel: parallel time-domain chromatic dispersion equalizer for
// one polarization.
//
// The ADC delivers NP samples per DSP clock, so NP distributive FIR lanes
// work side by side, each producing one equalized sample per clock. A
// sample_buffer of N1 = N + NP - 1 samples supplies them: lane p (output
// x_in[p]'s time index n) reads window[NP-1-p .. NP-1-p+N-1], which is
// x(n), x(n-1), ..., x(n-N+1). All lanes share one pair of coefficient
// level tables.
// Interface: in_valid qualifies a block x_in[0..NP-1] (element 0 oldest);
// one clock later out_valid is high and y_out[p] holds DELTA * y^Q(n) for
// sample p of that block. Latency counted from a sample to the output that
// uses it as the centre tap is floor((p + M) / NP) + 1 clocks for a sample
// at block position p, at most ceil((M + 1/2) / NP) + 1, the acquisition
// plus single processing stage of the original latency estimate.
module dfir_cde_parallel
  import cde_pkg::*;
#(
  parameter int       N              = 901,
  parameter int       DELTA          = 4,
  parameter int       NP             = 128,
  parameter bit       MULTIPLIERLESS = 1'b1,
  parameter lvl_tab_t QR             = coef_levels(N, DELTA, 1'b0),
  parameter lvl_tab_t QI             = coef_levels(N, DELTA, 1'b1)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cin_t  x_in  [NP],
  output logic  out_valid,
  output cacc_t y_out [NP]
);

  cin_t window [N+NP-1];

  sample_buffer #(.N(N), .NP(NP)) u_buf (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .window(window)
  );

  for (genvar p = 0; p < NP; p++) begin : g_lane
    cin_t lane_win [N];
    always_comb
      for (int k = 0; k < N; k++) lane_win[k] = window[NP-1-p+k];

    dfir_cde_lane #(
      .N(N), .DELTA(DELTA), .MULTIPLIERLESS(MULTIPLIERLESS), .QR(QR), .QI(QI)
    ) u_lane (
      .clk(clk), .rst_n(rst_n), .en(in_valid), .x_win(lane_win), .y(y_out[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
