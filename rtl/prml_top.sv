// prml_top: 5-tap adaptive PRML read channel for high-density optical
// discs (PR(a,b,c,d,e) target, 2T minimum run length).
//
// Three units run at one sample per channel-bit clock:
//  * adaptive_equalizer  - 11-tap LMS-adapted FIR filter (EQ out);
//  * viterbi_detector    - ten-state, sixteen-level Viterbi detector
//                          producing the extracted bit stream;
//  * channel_identifier  - tracks the sixteen reference levels from the
//                          sampled RF input and the detected bits, and
//                          feeds them to both other units.
// The connection pattern follows the published block diagram; the delays
// that line the data up with the decisions are derived here from the
// detector latency (PM_LEN+1), the filter latency (2) and its centre tap.
// Interface: rf_in is a signed ADC sample per clock; mu_shift and
// ci_shift set the LMS gain and the identification gain c = 2^ci_shift;
// the two enables freeze either adaptation. bit_out (1 = +1) lags the
// RF sample that carries the same bit's main response by
// PM_LEN + 3 + NUM_TAPS/2 cycles.
module prml_top
  import prml_pkg::*;
#(
  parameter int unsigned PM_LEN = prml_pkg::PM_LEN_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [ADC_W-1:0]  rf_in,
  input  logic [3:0]               mu_shift,
  input  logic [3:0]               ci_shift,
  input  logic                     eq_adapt_en,
  input  logic                     ci_adapt_en,
  output logic                     bit_out,
  output logic signed [EQ_W-1:0]   eq_out,
  output level_vec_t               levels,
  output logic signed [COEF_W-1:0] coef [NUM_TAPS],
  output logic signed [ERR_W-1:0]  lvl_err,
  output logic                     lvl_err_valid,
  output logic                     norm,
  output logic [NUM_STATES-1:0]    sel
);
  localparam int unsigned VD_LAT = PM_LEN + 1;
  localparam int unsigned RF_DLY = VD_LAT + 2 + NUM_TAPS / 2;

  adaptive_equalizer #(.VD_LAT(VD_LAT)) u_eq (
    .clk, .rst_n, .rf_in, .levels, .vd_bit(bit_out), .mu_shift,
    .adapt_en(eq_adapt_en), .eq_out, .err(lvl_err), .err_valid(lvl_err_valid),
    .coef);

  viterbi_detector #(.PM_LEN(PM_LEN)) u_vd (
    .clk, .rst_n, .eq_in(eq_out), .levels, .bit_out, .norm, .sel);

  channel_identifier #(.RF_DLY(RF_DLY)) u_ci (
    .clk, .rst_n, .rf_in, .vd_bit(bit_out), .en(ci_adapt_en), .ci_shift,
    .levels);
endmodule
