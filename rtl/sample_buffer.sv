// sample_buffer: input buffer of the parallel time-domain equalizer.
//
// Samples arrive NP at a time (NP = ADC rate / DSP clock). Every output of
// the block needs the N most recent samples up to itself, so the lanes
// together need a window of N1 = N + NP - 1 samples: the NP new ones plus the
// N-1 before them. The buffer keeps those N-1 in a shift register and shows
// the whole window combinationally, newest first:
//   window[j]      = x_in[NP-1-j]   for j < NP
//   window[NP + i] = hist[i]        (hist[0] = newest stored sample)
// When in_valid is high the N-1 newest samples of the window become the new
// history; otherwise the history holds. x_in[0] is the oldest sample of a
// block. Reset clears the history to zero, so the first outputs see zeros
// before the first sample. Organisation and reset are this design's choice.
module sample_buffer
  import cde_pkg::*;
#(
  parameter int N  = 901,
  parameter int NP = 128
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  cin_t x_in   [NP],
  output cin_t window [N+NP-1]
);

  localparam int NHIST = N - 1;

  cin_t hist [NHIST];

  initial assert (N >= 2 && NP >= 1) else $error("sample_buffer: N >= 2 and NP >= 1 required");

  always_comb begin
    for (int j = 0; j < NP; j++) window[j] = x_in[NP-1-j];
    for (int i = 0; i < NHIST; i++) window[NP+i] = hist[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NHIST; i++) hist[i] <= '0;
    end else if (in_valid) begin
      for (int i = 0; i < NHIST; i++) hist[i] <= window[i];
    end
  end

endmodule
