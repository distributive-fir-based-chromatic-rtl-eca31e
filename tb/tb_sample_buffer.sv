// tb_sample_buffer: N = 7, NP = 3 (window of N1 = 9). Blocks of 3 random
// samples go in with gaps in in_valid; a software history of every
// accepted sample gives the expected window (newest first, zeros before the
// first sample) on every cycle, including during gaps and after a reset.
module tb_sample_buffer;
  import cde_pkg::*;
  import cde_ref_pkg::*;

  localparam int N  = 7;
  localparam int NP = 3;
  localparam int NW = N + NP - 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  cin_t x_in [NP];
  cin_t window [NW];
  cin_t hist [$];  // accepted samples, newest at index 0
  int checks = 0;
  int failures = 0;
  int gaps = 0;

  always #5 clk = ~clk;

  sample_buffer #(.N(N), .NP(NP)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .window(window));

  task automatic check_window();
    cin_t e;
    for (int j = 0; j < NW; j++) begin
      if (j < NP) e = x_in[NP-1-j];
      else e = (j - NP < hist.size()) ? hist[j-NP] : cin_t'('0);
      checks++;
      if (window[j] != e) begin
        failures++;
        if (failures < 10) $display("FAIL window[%0d] got %h exp %h", j, window[j], e);
      end
    end
  endtask

  initial begin
    foreach (x_in[i]) x_in[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      if (t == 30) begin
        rst_n = 1'b0;
        hist.delete();
        #1 rst_n = 1'b1;
      end
      in_valid = ($urandom_range(3, 0) != 0);
      if (!in_valid) gaps++;
      foreach (x_in[i]) x_in[i] = rand_sample();
      #1 check_window();
      @(posedge clk);
      if (in_valid) for (int i = 0; i < NP; i++) hist.push_front(x_in[i]);
      #1;
    end
    checks++;
    if (gaps == 0) begin
      failures++;
      $display("FAIL: no gap in in_valid");
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
