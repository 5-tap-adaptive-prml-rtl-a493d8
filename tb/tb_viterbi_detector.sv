// tb_viterbi_detector: feeds the detector the ideal PR(a,b,c,d,e) levels
// of a random 2T..8T run-length stream, first without noise and then with
// bounded uniform noise, and checks that
//  * every output bit equals the written bit exactly PM_LEN+1 cycles
//    after the sample that carries it as its newest bit (rate: one bit
//    per clock);
//  * state metric normalization happened during the noisy run;
//  * both survivor choices of state 1111 occurred.
// The level values are computed here from the PR coefficients, not taken
// from the design.
module tb_viterbi_detector;
  import prml_pkg::*;
  localparam int PM = 16;
  localparam int PRC [5] = '{12, 22, 30, 19, 7};   // a..e
  localparam int N_CLEAN = 3000, N_NOISY = 30000;

  logic clk = 0, rst_n = 0;
  logic signed [EQ_W-1:0] eq_in;
  level_vec_t levels;
  logic bit_out, norm;
  logic [NUM_STATES-1:0] sel;
  int checks = 0, failures = 0, n_norm = 0, n_s0 = 0, n_s1 = 0;

  viterbi_detector #(.PM_LEN(PM)) dut (.clk, .rst_n, .eq_in, .levels, .bit_out, .norm, .sel);

  always #5 clk = ~clk;

  bit hist [64];
  int run_left = 0;
  bit cur = 0;

  initial begin
    repeat (N_CLEAN + N_NOISY + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (norm) n_norm++;
    if (sel[0]) n_s1++; else n_s0++;
  end

  initial begin
    int y, noise;
    // Level i from the sign pattern of i (PA8..NA8 order).
    for (int i = 0; i < NUM_LEVELS; i++) begin
      y = 0;
      for (int k = 0; k < 5; k++) y += LEVEL_PAT[i][4-k] ? PRC[k] : -PRC[k];
      levels[i] = LVL_W'(y);
    end
    for (int i = 0; i < 64; i++) hist[i] = 0;
    eq_in = '0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < N_CLEAN + N_NOISY; t++) begin
      if (run_left == 0) begin cur = ~cur; run_left = 2 + int'($urandom_range(6)); end
      run_left--;
      for (int i = 63; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = cur;
      y = 0;
      for (int k = 0; k < 5; k++) y += hist[4-k] ? PRC[k] : -PRC[k];
      noise = (t < N_CLEAN) ? 0 : int'($urandom_range(8)) - 4;
      eq_in = EQ_W'(y + noise);
      @(posedge clk); #1;
      // The sample driven in cycle t leaves in cycle t+PM+1; we are now
      // in cycle t+1, so the bit due is the one written PM cycles ago.
      if (t > PM + 8) begin
        checks++;
        if (bit_out != hist[PM]) begin
          failures++;
          if (failures < 10) $display("FAIL: t=%0d bit_out=%0d expected %0d", t, bit_out, hist[PM]);
        end
      end
      @(negedge clk);
    end
    $display("norm=%0d sel1111: %0d/%0d", n_norm, n_s1, n_s0);
    checks++; if (n_norm == 0) begin failures++; $display("FAIL: no normalization"); end
    checks++; if (n_s0 == 0 || n_s1 == 0) begin failures++; $display("FAIL: select coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
