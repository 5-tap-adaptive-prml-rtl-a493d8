// channel_identifier: adaptive estimate of the sixteen Viterbi reference
// levels.
//
// The last five detected bits select one level per sample, and only that
// level moves towards the input sample that those bits produced:
//   L(k+1) = L(k) + d/c,   d = x(k) - L(k).
// x is the sampled RF input, delayed by RF_DLY cycles to line up with the
// decisions, and c = 2^ci_shift is the channel identification gain.
// Each level keeps CI_FRAC fraction bits; the integer part is output.
// The update rule, the RF input as data source and the 16 levels follow
// the published design. The alignment delay, power-of-two gain, fraction
// bits and the start values (ideal PR(PR_A..PR_E) levels, which the
// design does not fix) are this design's choices.
// Timing: one update per clock while en is high and the pattern is legal;
// levels change one cycle after the update.
module channel_identifier
  import prml_pkg::*;
#(
  parameter int unsigned RF_DLY  = prml_pkg::PM_LEN_DEF + 8,   // >= 1
  parameter int unsigned CI_FRAC = 8,
  parameter int          PR_A    = 10,
  parameter int          PR_B    = 20,
  parameter int          PR_C    = 28,
  parameter int          PR_D    = 18,
  parameter int          PR_E    = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] rf_in,
  input  logic                    vd_bit,
  input  logic                    en,
  input  logic [3:0]              ci_shift,
  output level_vec_t              levels
);
  localparam int unsigned L_W = LVL_W + CI_FRAC;

  logic signed [ADC_W-1:0] rf_dl [RF_DLY];
  logic [4:1]              vd_sr;
  level_sel_t              lsel;
  logic signed [L_W-1:0]   lvl [NUM_LEVELS];
  logic signed [L_W:0]     d;
  logic signed [L_W-1:0]   step;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < int'(RF_DLY); k++) rf_dl[k] <= '0;
      vd_sr <= '0;
    end else begin
      rf_dl[0] <= rf_in;
      for (int k = 1; k < int'(RF_DLY); k++) rf_dl[k] <= rf_dl[k-1];
      vd_sr <= {vd_sr[3:1], vd_bit};
    end

  always_comb begin
    lsel = pat_to_level({vd_sr, vd_bit});
    d    = ((L_W+1)'(rf_dl[RF_DLY-1]) <<< CI_FRAC) - (L_W+1)'(lvl[lsel.idx]);
    // |d| >> ci_shift fits L_W bits for ci_shift >= 1; c = 1 copies x.
    step = (ci_shift == 4'd0) ? L_W'(d) : L_W'(d >>> ci_shift);
  end

  for (genvar i = 0; i < int'(NUM_LEVELS); i++) begin : g_lvl
    localparam int INIT = ideal_level(i, PR_A, PR_B, PR_C, PR_D, PR_E);
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)
        lvl[i] <= L_W'(INIT) <<< CI_FRAC;
      else if (en && lsel.valid && (lsel.idx == level_e'(i)))
        lvl[i] <= lvl[i] + step;
    assign levels[i] = lvl[i][L_W-1 -: LVL_W];
  end
endmodule
