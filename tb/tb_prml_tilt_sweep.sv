// tb_prml_tilt_sweep: bit error rate of the complete PRML channel over a
// sweep of channel distortions of the kind disc tilt causes.
//
// The reference channel is a 7-tap response with its peak on the third
// tap. A tilt step k (k = -4..4) makes the response asymmetric by adding
// k times its scaled first difference (a coma-like lean to one side),
// and adds crosstalk from an independent neighbouring track whose gain
// grows with |k|. At every point the design is reset, trained with both
// adaptations on, and the detected bits are counted against the written
// ones over a measurement window. The distortion model is this test's
// own; it only stands in for tilt and does not reproduce measured disc
// responses.
// A strongly leaning response moves the sample the loop locks to, so the
// detected stream may come out a cycle earlier or later: errors are
// counted at every lag within +/-3 of the nominal latency and the best
// one is reported (a downstream demodulator finds this by its sync marks).
// Checks: no errors at zero tilt, at the nominal lag; BER at most 2e-4
// for |k| <= 2.
module tb_prml_tilt_sweep;
  import prml_pkg::*;

  localparam int N_TRAIN = 40000;
  localparam int N_MEAS  = 20000;
  localparam int HLEN    = 7;
  localparam int H0 [HLEN] = '{7, 17, 31, 23, 12, 5, -3};  // h[0] = newest bit
  localparam int LAG     = int'(PM_LEN_DEF) + 2 + int'(NUM_TAPS) / 2;
  localparam int KMAX    = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [ADC_W-1:0] rf_in = '0;
  logic [3:0] mu_shift = 4'd2, ci_shift = 4'd6;
  logic eq_adapt_en = 1'b1, ci_adapt_en = 1'b1;
  logic bit_out, norm, lvl_err_valid;
  logic signed [EQ_W-1:0] eq_out;
  level_vec_t levels;
  logic signed [COEF_W-1:0] coef [NUM_TAPS];
  logic signed [ERR_W-1:0] lvl_err;
  logic [NUM_STATES-1:0] sel;

  prml_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat ((2 * KMAX + 1) * (N_TRAIN + N_MEAS + 10) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Two independent 2T..8T run-length-limited sources.
  int  run_left [2] = '{0, 0};
  bit  cur [2] = '{1'b0, 1'b0};
  function automatic bit next_bit(input int s);
    if (run_left[s] == 0) begin
      cur[s] = ~cur[s];
      run_left[s] = 2 + int'($urandom_range(6));
    end
    run_left[s]--;
    return cur[s];
  endfunction

  initial begin
    int h [HLEN];
    bit hist [LAG + HLEN + 4];
    int lerr [7];
    int best;
    bit nb [HLEN];
    int y, xt, errs;
    real ber;
    for (int k = -KMAX; k <= KMAX; k++) begin
      // Lean the response: h + k*(h[i-1] - h[i+1])/8.
      for (int i = 0; i < HLEN; i++)
        h[i] = H0[i] + (k * (((i > 0) ? H0[i-1] : 0) - ((i < HLEN-1) ? H0[i+1] : 0))) / 8;
      for (int i = 0; i < LAG + HLEN + 4; i++) hist[i] = 1'b0;
      for (int l = 0; l < 7; l++) lerr[l] = 0;
      for (int i = 0; i < HLEN; i++) nb[i] = 1'b0;
      rst_n = 1'b0;
      repeat (2) @(posedge clk);
      rst_n = 1'b1;
      errs = 0;
      for (int t = 0; t < N_TRAIN + N_MEAS; t++) begin
        for (int i = LAG + HLEN + 3; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = next_bit(0);
        for (int i = HLEN - 1; i > 0; i--) nb[i] = nb[i-1];
        nb[0] = next_bit(1);
        y = 0; xt = 0;
        for (int i = 0; i < HLEN; i++) begin
          y  += hist[i] ? h[i] : -h[i];
          xt += nb[i] ? H0[i] : -H0[i];
        end
        // Crosstalk gain |k|/32 of the neighbour's signal, plus noise.
        y += ((k < 0 ? -k : k) * xt) / 32 + int'($urandom_range(6)) - 3;
        rf_in = ADC_W'((y > 127) ? 127 : (y < -128) ? -128 : y);
        @(posedge clk);
        #1;
        if (t >= N_TRAIN)
          for (int l = 0; l < 7; l++) if (bit_out != hist[LAG - 3 + l]) lerr[l]++;
      end
      best = 3;
      for (int l = 0; l < 7; l++) if (lerr[l] < lerr[best]) best = l;
      errs = lerr[best];
      ber = real'(errs) / real'(N_MEAS);
      $display("tilt step %0d: taps %0d %0d %0d %0d %0d %0d %0d  lag %0d  errors %0d / %0d  BER %e",
               k, h[0], h[1], h[2], h[3], h[4], h[5], h[6], LAG - 3 + best, errs, N_MEAS, ber);
      if (k == 0) begin
        checks++;
        if (lerr[3] != 0) begin failures++; $display("FAIL: errors at zero tilt"); end
      end
      if (k >= -2 && k <= 2) begin
        checks++;
        if (ber > 2.0e-4) begin failures++; $display("FAIL: BER above 2e-4 at tilt step %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
