// fir_filter: the 11-tap FIR filter at the heart of the adaptive equalizer.
//
// The sampled RF input is shifted into an NUM_TAPS-long tap line; each
// cycle the weighted sum of the tap line with the weights from the LMS
// calculator is rounded to the nearest integer, saturated to EQ_W bits
// and registered as the equalizer output (EQ out).
// The tap count follows the published design; direct form, rounding,
// saturation and widths are this design's choices.
// Timing: one sample per clock. eq_out in cycle t is
//   sum_j coef[j] * rf_in(t-2-j) / 2^COEF_FRAC.
// Reset clears the tap line and the output.
module fir_filter #(
  parameter int unsigned NUM_TAPS  = prml_pkg::NUM_TAPS,
  parameter int unsigned ADC_W     = prml_pkg::ADC_W,
  parameter int unsigned COEF_W    = prml_pkg::COEF_W,
  parameter int unsigned COEF_FRAC = prml_pkg::COEF_FRAC,
  parameter int unsigned EQ_W      = prml_pkg::EQ_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [ADC_W-1:0]  rf_in,
  input  logic signed [COEF_W-1:0] coef [NUM_TAPS],
  output logic signed [EQ_W-1:0]   eq_out
);
  localparam int unsigned ACC_W = ADC_W + COEF_W + $clog2(NUM_TAPS);
  localparam logic signed [ACC_W-1:0] EQ_MAX = ACC_W'(2**(EQ_W-1) - 1);
  localparam logic signed [ACC_W-1:0] EQ_MIN = -ACC_W'(2**(EQ_W-1));

  logic signed [ADC_W-1:0] taps [NUM_TAPS];
  logic signed [ACC_W-1:0] acc, scaled;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int j = 0; j < int'(NUM_TAPS); j++) taps[j] <= '0;
    end else begin
      taps[0] <= rf_in;
      for (int j = 1; j < int'(NUM_TAPS); j++) taps[j] <= taps[j-1];
    end

  always_comb begin
    acc = '0;
    for (int j = 0; j < int'(NUM_TAPS); j++)
      acc += ACC_W'(taps[j]) * ACC_W'(coef[j]);
    scaled = (acc + ACC_W'(2**(COEF_FRAC-1))) >>> COEF_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                 eq_out <= '0;
    else if (scaled > EQ_MAX)   eq_out <= EQ_MAX[EQ_W-1:0];
    else if (scaled < EQ_MIN)   eq_out <= EQ_MIN[EQ_W-1:0];
    else                        eq_out <= scaled[EQ_W-1:0];
endmodule
