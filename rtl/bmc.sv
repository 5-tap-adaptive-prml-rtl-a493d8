// bmc: branch metric calculator for one reference level.
//
// Computes the distance |x - y| between the equalizer output x and one
// reference level y. As in the published block diagram, both differences
// x-y and y-x are formed in parallel and a 2:1 multiplexer picks the
// non-negative one; the multiplexer is steered here by the sign of x-y
// (the select source is this design's choice). The detector uses 16 of
// these, one per level PA8..NA8.
// Purely combinational. Widths are this design's choice: BM_W must be at
// least max(EQ_W, LVL_W)+1 bits.
module bmc #(
  parameter int unsigned EQ_W  = prml_pkg::EQ_W,
  parameter int unsigned LVL_W = prml_pkg::LVL_W,
  parameter int unsigned BM_W  = prml_pkg::BM_W
) (
  input  logic signed [EQ_W-1:0]  x,   // equalizer output
  input  logic signed [LVL_W-1:0] y,   // reference level
  output logic        [BM_W-1:0]  bm   // |x - y|
);
  localparam int unsigned DW = ((EQ_W > LVL_W) ? EQ_W : LVL_W) + 1;

  logic signed [DW-1:0] x_minus_y, y_minus_x;

  always_comb begin
    x_minus_y = DW'(x) - DW'(y);
    y_minus_x = DW'(y) - DW'(x);
    bm = x_minus_y[DW-1] ? BM_W'(unsigned'(y_minus_x)) : BM_W'(unsigned'(x_minus_y));
  end
endmodule
