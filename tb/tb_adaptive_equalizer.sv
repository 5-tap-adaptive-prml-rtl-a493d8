// tb_adaptive_equalizer: the equalizer sees a PR(10,20,28,18,8) signal
// attenuated and smeared by an echo (rf = (5y + 3y(t-1))/8, plus noise),
// with the sixteen ideal levels fixed and correct decisions supplied as
// the detector would (VD_LAT cycles after the EQ sample). It checks that
// the LMS loop converges: the mean absolute level error over the last
// samples must be well below that of the first adapted samples and
// small in absolute terms, at most 1% of the late samples may be more
// than 4 off their level, and the weights must have left their start.
module tb_adaptive_equalizer;
  import prml_pkg::*;
  localparam int VD = 6;
  localparam int PRC [5] = '{10, 20, 28, 18, 8};
  localparam int N = 40000;
  logic clk = 0, rst_n = 0;
  logic signed [ADC_W-1:0] rf_in;
  level_vec_t levels;
  logic vd_bit;
  logic [3:0] mu_shift;
  logic adapt_en;
  logic signed [EQ_W-1:0] eq_out;
  logic signed [ERR_W-1:0] err;
  logic err_valid;
  logic signed [COEF_W-1:0] coef [NUM_TAPS];
  int checks = 0, failures = 0;

  adaptive_equalizer #(.VD_LAT(VD)) dut (.clk, .rst_n, .rf_in, .levels, .vd_bit, .mu_shift,
    .adapt_en, .eq_out, .err, .err_valid, .coef);

  always #5 clk = ~clk;

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist [128];
    int yh [4];
    int y, run_left, early, late, n_early, n_late, moved, n_big;
    bit cur;
    run_left = 0; cur = 0; n_big = 0; early = 0; late = 0; n_early = 0; n_late = 0;
    for (int i = 0; i < NUM_LEVELS; i++) begin
      y = 0;
      for (int k = 0; k < 5; k++) y += LEVEL_PAT[i][4-k] ? PRC[k] : -PRC[k];
      levels[i] = LVL_W'(y);
    end
    for (int i = 0; i < 128; i++) hist[i] = 0;
    for (int i = 0; i < 4; i++) yh[i] = 0;
    rf_in = '0; vd_bit = 0; mu_shift = 4'd3; adapt_en = 1;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < N; t++) begin
      if (run_left == 0) begin cur = ~cur; run_left = 2 + int'($urandom_range(6)); end
      run_left--;
      for (int i = 127; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = cur;
      y = 0;
      for (int k = 0; k < 5; k++) y += hist[4-k] ? PRC[k] : -PRC[k];
      for (int i = 3; i > 0; i--) yh[i] = yh[i-1];
      yh[0] = y;
      rf_in = ADC_W'((5 * yh[0] + 3 * yh[1]) / 8 + int'($urandom_range(2)) - 1);
      // eq_out(t) follows rf(t-7) on the centre tap; its decision is due
      // VD cycles later, so the bit driven now is bit(t-7-VD).
      vd_bit = hist[7 + VD];
      @(posedge clk); #1;
      if (err_valid && t > 60) begin
        if (t < 560)      begin early += (err < 0) ? -int'(err) : int'(err); n_early++; end
        if (t > N - 5000) begin
          late += (err < 0) ? -int'(err) : int'(err); n_late++;
          if (err > 4 || err < -4) n_big++;
        end
      end
      @(negedge clk);
    end
    moved = 0;
    for (int j = 0; j < NUM_TAPS; j++) if (coef[j] != ((j == NUM_TAPS/2) ? COEF_W'(1 << COEF_FRAC) : '0)) moved++;
    $display("mean |err| early %0d/%0d late %0d/%0d, taps moved %0d", early, n_early, late, n_late, moved);
    checks++; if (n_early == 0 || n_late == 0) begin failures++; $display("FAIL: no valid errors"); end
    checks++; if (late * n_early * 3 > early * n_late) begin failures++; $display("FAIL: error not reduced 3x"); end
    checks++; if (late > 2 * n_late) begin failures++; $display("FAIL: final mean |err| >= 2"); end
    $display("late samples beyond +/-4: %0d", n_big);
    // After convergence almost every sample sits within 4 of its level.
    checks++; if (n_big * 100 > n_late) begin failures++; $display("FAIL: %0d late errors beyond +/-4", n_big); end
    checks++; if (moved < 3) begin failures++; $display("FAIL: weights did not adapt"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
