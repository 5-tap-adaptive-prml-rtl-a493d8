// lms_calculator: least-mean-square update of the FIR tap weights,
//   W(k+1) = W(k) + 2*mu*eps*X(k),
// where eps is the level error and X(k) the tap inputs that produced the
// equalizer sample eps belongs to (supplied already aligned).
// The update rule follows the published design. The gain 2*mu is a power
// of two chosen at run time: each weight is held in an accumulator with
// ACC_EXTRA extra fraction bits, and eps*X is shifted right by mu_shift
// before it is added, so 2*mu = 2^-(mu_shift + COEF_FRAC + ACC_EXTRA) in
// units where one input LSB is 1. Accumulators saturate. The weights reset
// to 1.0 on the centre tap and 0 elsewhere; these are this design's choices.
// Timing: one update per clock while en and err_valid are high; coef
// shows the result one cycle later.
module lms_calculator #(
  parameter int unsigned NUM_TAPS  = prml_pkg::NUM_TAPS,
  parameter int unsigned ADC_W     = prml_pkg::ADC_W,
  parameter int unsigned ERR_W     = prml_pkg::ERR_W,
  parameter int unsigned COEF_W    = prml_pkg::COEF_W,
  parameter int unsigned COEF_FRAC = prml_pkg::COEF_FRAC,
  parameter int unsigned ACC_EXTRA = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [3:0]               mu_shift,
  input  logic signed [ERR_W-1:0]  err,
  input  logic                     err_valid,
  input  logic signed [ADC_W-1:0]  x_vec [NUM_TAPS],
  output logic signed [COEF_W-1:0] coef  [NUM_TAPS]
);
  localparam int unsigned A_W    = COEF_W + ACC_EXTRA;
  localparam int unsigned CENTER = NUM_TAPS / 2;
  localparam logic signed [A_W:0] A_MAX = (A_W+1)'(2**(A_W-1) - 1);
  localparam logic signed [A_W:0] A_MIN = -(A_W+1)'(2**(A_W-1));

  logic signed [A_W-1:0] acc [NUM_TAPS];

  for (genvar j = 0; j < int'(NUM_TAPS); j++) begin : g_tap
    logic signed [A_W:0] grad, upd;
    always_comb begin
      grad = ((A_W+1)'(err) * (A_W+1)'(x_vec[j])) >>> mu_shift;
      upd  = (A_W+1)'(acc[j]) + grad;
    end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)
        acc[j] <= (j == int'(CENTER)) ? A_W'(1) <<< (COEF_FRAC + ACC_EXTRA) : '0;
      else if (en && err_valid)
        acc[j] <= (upd > A_MAX) ? A_MAX[A_W-1:0] :
                  (upd < A_MIN) ? A_MIN[A_W-1:0] : upd[A_W-1:0];
    assign coef[j] = acc[j][A_W-1 -: COEF_W];
  end
endmodule
