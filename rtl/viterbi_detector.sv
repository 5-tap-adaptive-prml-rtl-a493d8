// viterbi_detector: ten-state Viterbi detector for a PR(a,b,c,d,e) channel
// carrying a code with a 2T minimum run length.
//
// Sixteen branch metric calculators form |eq_in - L_i| for the sixteen
// reference levels L_i (PA8..NA8), which come from the channel identifier
// and change at run time. Ten ACS units, one per legal state (the last
// four bits: 1111, 1110, 1100, 1001, 1000, 0111, 0110, 0011, 0001, 0000),
// add them to the state metrics along the trellis, six of them choosing
// between two predecessors and four having one. When every state metric
// has its MSB set, all are normalized by 2^(SM_W-1) on the next update
// (`norm` pulses). The survivors are kept in a register-exchange path
// memory whose output is the detected bit stream.
// Trellis, level list and unit counts follow the published design; the
// overflow rule and the widths are this design's choices.
// Timing: one sample per clock; the bit decided for the sample on eq_in in
// cycle t appears on bit_out in cycle t + PM_LEN + 1.
module viterbi_detector
  import prml_pkg::*;
#(
  parameter int unsigned PM_LEN = prml_pkg::PM_LEN_DEF,
  parameter int unsigned SM_W   = prml_pkg::SM_W_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [EQ_W-1:0] eq_in,
  input  level_vec_t            levels,
  output logic                  bit_out,
  output logic                  norm,     // metrics normalized this cycle
  output logic [NUM_STATES-1:0] sel       // survivor decisions
);
  logic [BM_W-1:0] bm [NUM_LEVELS];
  logic [SM_W-1:0] sm [NUM_STATES];
  logic [NUM_STATES-1:0] msb;

  for (genvar i = 0; i < int'(NUM_LEVELS); i++) begin : g_bmc
    bmc #(.EQ_W(EQ_W), .LVL_W(LVL_W), .BM_W(BM_W)) u_bmc (
      .x(eq_in), .y(levels[i]), .bm(bm[i]));
  end

  for (genvar s = 0; s < int'(NUM_STATES); s++) begin : g_acs
    localparam logic [3:0] CODE = STATE_CODE[s];
    localparam int PA  = pred_index(CODE, 1'b1);
    localparam int PB  = pred_index(CODE, 1'b0);
    localparam bit TWO = (PA >= 0) && (PB >= 0);
    // A lone predecessor goes on input 1.
    localparam int P1  = (PA >= 0) ? PA : PB;
    localparam int P0  = (PB >= 0) ? PB : PA;
    localparam int L1  = branch_level(CODE, (PA >= 0) ? 1'b1 : 1'b0);
    localparam int L0  = branch_level(CODE, (PB >= 0) ? 1'b0 : 1'b1);
    acs #(.SM_W(SM_W), .BM_W(BM_W), .TWO_WAY(TWO)) u_acs (
      .clk, .rst_n,
      .sm_a(sm[P1]), .bm_a(bm[L1]),
      .sm_b(sm[P0]), .bm_b(bm[L0]),
      .ovf(norm), .sm(sm[s]), .sel(sel[s]));
    assign msb[s] = sm[s][SM_W-1];
  end

  assign norm = &msb;

  path_memory #(.PM_LEN(PM_LEN)) u_pm (
    .clk, .rst_n, .sel, .bit_out);
endmodule
