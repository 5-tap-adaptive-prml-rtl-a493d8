// tb_prml_top: end-to-end test of the 5-tap adaptive PRML channel at its
// default parameters.
//
// A random run-length-limited bit stream (runs of 2 to 8 bits, as in a
// 2T/8T optical disc code) is passed through a 7-tap channel whose main
// response differs from the detector's start levels and which has a tail
// the five-tap target does not model, plus uniform noise. The
// testbench first runs with both adaptations off, then with them on,
// and checks:
//  * the detected stream matches the written one at a fixed lag, with no
//    errors in the final measurement window;
//  * the equalizer weights and the reference levels have moved, and the
//    largest level has moved towards the channel's own peak level;
//  * each mechanism happened: LMS updates, level updates, ACS selects of
//    both kinds, state metric normalization, an illegal pattern flagged.
// The lag is found by searching, then checked against the design's
// latency PM_LEN + 3 + NUM_TAPS/2 (counted from the cycle the RF sample
// is driven) plus the channel's main-tap position.
module tb_prml_top;
  import prml_pkg::*;

  localparam int N_TRAIN  = 60000;   // adapted samples before measuring
  localparam int N_MEAS   = 20000;   // error-counting window
  localparam int N_FROZEN = 3000;    // samples with adaptation off
  localparam int HLEN     = 7;
  localparam int H [HLEN] = '{7, 17, 31, 23, 12, 5, -3}; // h[0] = newest bit
  localparam int MAIN     = 2;       // channel tap lined up with the target's c
  localparam int MAXLAG   = 80;
  localparam int EXP_LAG  = int'(PM_LEN_DEF) + 2 + int'(NUM_TAPS) / 2 + MAIN - 2;  // sampled one cycle after the edge

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [ADC_W-1:0] rf_in = '0;
  logic [3:0] mu_shift = 4'd2, ci_shift = 4'd6;
  logic eq_adapt_en = 1'b0, ci_adapt_en = 1'b0;
  logic bit_out, norm, lvl_err_valid;
  logic signed [EQ_W-1:0] eq_out;
  level_vec_t levels;
  logic signed [COEF_W-1:0] coef [NUM_TAPS];
  logic signed [ERR_W-1:0] lvl_err;
  logic [NUM_STATES-1:0] sel;

  prml_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  bit hist [MAXLAG+HLEN+1];      // hist[i] = bit written i samples ago
  int lag_err [MAXLAG+1];
  int n_norm = 0, n_sel0 = 0, n_sel1 = 0, n_invalid = 0, n_lms = 0, n_ci = 0;
  int meas_err = 0, meas_n = 0;
  int run_left = 0;
  bit cur_bit = 1'b0;
  level_t lv0 [NUM_LEVELS];
  logic signed [COEF_W-1:0] c0 [NUM_TAPS];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit next_bit();
    if (run_left == 0) begin
      cur_bit  = ~cur_bit;
      run_left = 2 + int'($urandom_range(6));
    end
    run_left--;
    return cur_bit;
  endfunction

  // Watchdog.
  initial begin
    repeat (N_FROZEN + N_TRAIN + N_MEAS + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (norm) n_norm++;
    if (sel[0]) n_sel1++; else n_sel0++;
    if (!lvl_err_valid) n_invalid++;
    if (lvl_err_valid && eq_adapt_en) n_lms++;
  end

  initial begin
    int best_lag, best_err, y, acc_noise;
    bit b;
    for (int i = 0; i < MAXLAG+HLEN+1; i++) hist[i] = 1'b0;
    for (int l = 0; l <= MAXLAG; l++) lag_err[l] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NUM_LEVELS; i++) lv0[i] = levels[i];
    for (int j = 0; j < NUM_TAPS; j++) c0[j] = coef[j];
    for (int t = 0; t < N_FROZEN + N_TRAIN + N_MEAS; t++) begin
      if (t == N_FROZEN) begin eq_adapt_en = 1'b1; ci_adapt_en = 1'b1; end
      b = next_bit();
      for (int i = MAXLAG+HLEN; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = b;
      y = 0;
      for (int i = 0; i < HLEN; i++) y += hist[i] ? H[i] : -H[i];
      acc_noise = int'($urandom_range(6)) - 3;
      rf_in = ADC_W'(y + acc_noise);
      @(posedge clk);
      #1;
      if (ci_adapt_en) for (int i = 0; i < NUM_LEVELS; i++) if (levels[i] != lv0[i]) n_ci++;
      // Lag search over the last part of training; error count afterwards.
      if (t >= N_FROZEN + N_TRAIN - 5000 && t < N_FROZEN + N_TRAIN)
        for (int l = 0; l <= MAXLAG; l++) if (bit_out != hist[l]) lag_err[l]++;
      if (t == N_FROZEN + N_TRAIN) begin
        best_lag = 0; best_err = lag_err[0];
        for (int l = 1; l <= MAXLAG; l++)
          if (lag_err[l] < best_err) begin best_err = lag_err[l]; best_lag = l; end
        $display("lag %0d (expected %0d), errors in search window %0d", best_lag, EXP_LAG, best_err);
        check(best_lag == EXP_LAG, "detector lag");
      end
      if (t > N_FROZEN + N_TRAIN) begin
        meas_n++;
        if (bit_out != hist[EXP_LAG]) meas_err++;
      end
    end
    $display("measured %0d bits, %0d errors", meas_n, meas_err);
    check(meas_err == 0, "bit errors after adaptation");
    $write("levels:");
    for (int i = 0; i < NUM_LEVELS; i++) $write(" %0d", levels[i]);
    $write("\ncoef:");
    for (int j = 0; j < NUM_TAPS; j++) $write(" %0d", coef[j]);
    $display("");
    begin
      int moved = 0;
      for (int j = 0; j < NUM_TAPS; j++) if (coef[j] != c0[j]) moved++;
      check(moved > 0, "equalizer weights adapted");
    end
    // Peak level of this channel's main five taps, seen through a filter
    // that leaves the main response in place.
    check(levels[PA8] > lv0[PA8], "PA8 moved up towards the channel peak");
    check(levels[NA8] < lv0[NA8], "NA8 moved down towards the channel peak");
    $display("norm=%0d sel0=%0d sel1=%0d invalid=%0d lms=%0d ci=%0d",
             n_norm, n_sel0, n_sel1, n_invalid, n_lms, n_ci);
    check(n_norm > 0, "state metric normalization happened");
    check(n_sel0 > 0 && n_sel1 > 0, "both survivor choices for state 1111");
    check(n_invalid > 0, "illegal pattern flagged");
    check(n_lms > 0, "LMS updates");
    check(n_ci > 0, "level updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
