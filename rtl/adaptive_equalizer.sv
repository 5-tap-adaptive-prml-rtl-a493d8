// adaptive_equalizer: PR(a,b,c,d,e) adaptive equalizer.
//
// An 11-tap FIR filter shapes the sampled RF signal (EQ out) towards the
// sixteen reference levels. The level error detector compares EQ out with
// the level the Viterbi detector's decisions select, and the LMS
// calculator uses that error to update the weights. Because the error
// arrives VD_LAT+1 cycles after the sample (detector latency plus the
// error register), a longer input history supplies the tap vector that
// produced that sample, so the update is a delayed LMS. The composition
// follows the published equalizer; the alignment mechanism is this
// design's choice.
// Timing: eq_out(t) = sum_j coef[j]*rf_in(t-2-j)/2^COEF_FRAC; vd_bit must
// be the decision for eq_out of cycle t-VD_LAT.
module adaptive_equalizer
  import prml_pkg::*;
#(
  parameter int unsigned VD_LAT = prml_pkg::PM_LEN_DEF + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [ADC_W-1:0]  rf_in,
  input  level_vec_t               levels,
  input  logic                     vd_bit,
  input  logic [3:0]               mu_shift,
  input  logic                     adapt_en,
  output logic signed [EQ_W-1:0]   eq_out,
  output logic signed [ERR_W-1:0]  err,
  output logic                     err_valid,
  output logic signed [COEF_W-1:0] coef [NUM_TAPS]
);
  // hist[k] in cycle t holds rf_in(t-1-k). The error in cycle t belongs
  // to eq_out(t-VD_LAT-1), whose taps were rf_in(t-VD_LAT-3-j).
  localparam int unsigned X_OFF  = VD_LAT + 2;
  localparam int unsigned HIST_N = X_OFF + NUM_TAPS;

  logic signed [ADC_W-1:0] hist  [HIST_N];
  logic signed [ADC_W-1:0] x_vec [NUM_TAPS];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < int'(HIST_N); k++) hist[k] <= '0;
    end else begin
      hist[0] <= rf_in;
      for (int k = 1; k < int'(HIST_N); k++) hist[k] <= hist[k-1];
    end

  always_comb
    for (int j = 0; j < int'(NUM_TAPS); j++) x_vec[j] = hist[X_OFF + j];

  fir_filter u_fir (
    .clk, .rst_n, .rf_in, .coef, .eq_out);

  level_error_detector #(.EQ_DLY(VD_LAT)) u_led (
    .clk, .rst_n, .eq_in(eq_out), .vd_bit, .levels, .err, .err_valid);

  lms_calculator u_lms (
    .clk, .rst_n, .en(adapt_en), .mu_shift, .err, .err_valid, .x_vec, .coef);
endmodule
