// level_error_detector: adaptation error for the LMS update.
//
// The detected bit (VD out[0]) and its four predecessors, held in a
// four-stage shift register (VD out[1..4]), form a 5-bit pattern that
// selects one of the sixteen reference levels through a 16:1 multiplexer
// (inputs 0..15 = PA8..PA1, NA1..NA8). The equalizer output is delayed by
// EQ_DLY cycles so that it is the sample those bits belong to, and the
// error is  err = selected level - delayed EQ out. This structure follows
// the published level error detector. The pattern-to-input mapping
// (VD out[4] is the oldest bit), the flag for a pattern that breaks the
// 2T rule and the output register are this design's choices.
// Timing: err and err_valid in cycle t+1 belong to the EQ sample that
// entered in cycle t-EQ_DLY. Reset clears the delay lines.
module level_error_detector
  import prml_pkg::level_vec_t, prml_pkg::level_sel_t, prml_pkg::pat_to_level;
#(
  parameter int unsigned EQ_DLY = prml_pkg::PM_LEN_DEF + 1,   // >= 1
  parameter int unsigned EQ_W   = prml_pkg::EQ_W,
  parameter int unsigned ERR_W  = prml_pkg::ERR_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [EQ_W-1:0]  eq_in,      // EQ out
  input  logic                    vd_bit,     // VD out[0]
  input  level_vec_t              levels,
  output logic signed [ERR_W-1:0] err,        // adaptation level error
  output logic                    err_valid
);
  logic signed [EQ_W-1:0] eq_dl [EQ_DLY];
  logic [4:1]             vd_sr;              // VD out[4:1]
  logic [4:0]             vd_out;
  level_sel_t             lsel;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < int'(EQ_DLY); k++) eq_dl[k] <= '0;
      vd_sr <= '0;
    end else begin
      eq_dl[0] <= eq_in;
      for (int k = 1; k < int'(EQ_DLY); k++) eq_dl[k] <= eq_dl[k-1];
      vd_sr <= {vd_sr[3:1], vd_bit};
    end

  always_comb begin
    vd_out = {vd_sr, vd_bit};
    lsel   = pat_to_level(vd_out);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      err       <= '0;
      err_valid <= 1'b0;
    end else begin
      err       <= ERR_W'(levels[lsel.idx]) - ERR_W'(eq_dl[EQ_DLY-1]);
      err_valid <= lsel.valid;
    end
endmodule
