// acs: add-compare-select unit for one trellis state.
//
// Each predecessor's state metric is added to the branch metric of the
// branch that leaves it; the smaller sum becomes the new state metric.
// The comparison is the sign (MSB) of sum_a - sum_b: when it is 1, sum_a
// (multiplexer input 1) is smaller and is kept; this MSB is also the
// survivor select `sel` used by the path memory. A second multiplexer
// replaces the result with its normalized value when the shared overflow
// control `ovf` is high. This structure follows the published ACS
// drawing; what counts as overflow is this design's choice: `ovf` is
// driven high by the detector when every registered metric has its MSB
// set, and the normalized value is then the new metric minus 2^(SM_W-1).
// States with a single predecessor (TWO_WAY = 0) only add; their `sel`
// is 1 and the b inputs are not used.
// Timing: the state metric is registered; `sel` is combinational from the
// current metrics and branch metrics. Reset clears the metric.
module acs #(
  parameter int unsigned SM_W    = prml_pkg::SM_W_DEF,
  parameter int unsigned BM_W    = prml_pkg::BM_W,
  parameter bit          TWO_WAY = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [SM_W-1:0] sm_a,   // predecessor on input 1 (oldest bit 1)
  input  logic [BM_W-1:0] bm_a,
  input  logic [SM_W-1:0] sm_b,   // predecessor on input 0 (oldest bit 0)
  input  logic [BM_W-1:0] bm_b,
  input  logic            ovf,    // overflow control
  output logic [SM_W-1:0] sm,     // state metric (registered)
  output logic            sel     // 1: input 1 survives
);
  logic [SM_W-1:0] sum_a, sum_b, chosen, next_sm;
  logic [SM_W:0]   diff;

  always_comb begin
    sum_a = sm_a + SM_W'(bm_a);
    sum_b = sm_b + SM_W'(bm_b);
    diff  = {1'b0, sum_a} - {1'b0, sum_b};
    if (TWO_WAY) begin
      sel    = diff[SM_W];
      chosen = sel ? sum_a : sum_b;
    end else begin
      sel    = 1'b1;
      chosen = sum_a;
    end
    // Normalized overflow value: every metric is at least 2^(SM_W-1) when
    // ovf is high, so clearing the MSB subtracts that amount from all.
    next_sm = ovf ? {1'b0, chosen[SM_W-2:0]} : chosen;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sm <= '0;
    else        sm <= next_sm;

  // The metric width must be wide enough that no sum wraps.
  a_no_wrap_a: assert property (@(posedge clk) disable iff (!rst_n)
                                ({1'b0, sm_a} + (SM_W+1)'(bm_a)) < (SM_W+1)'(2**SM_W));
  a_no_wrap_b: assert property (@(posedge clk) disable iff (!rst_n)
                                !TWO_WAY || ({1'b0, sm_b} + (SM_W+1)'(bm_b)) < (SM_W+1)'(2**SM_W));
endmodule
