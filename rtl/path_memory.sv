// path_memory: register-exchange survivor memory for the ten-state
// PR(a,b,c,d,e) trellis.
//
// Every state s keeps an n-bit survivor Q_s. Each cycle Q_s is loaded with
// the survivor of the predecessor chosen by sel_s, shifted up by one with
// the newest bit of s (its LSB) entering at bit 0, e.g.
//   Q_1111 <= sel_1111 ? {Q_1111[n-2:0],1} : {Q_0111[n-2:0],1}
//   Q_0111 <= {Q_0011[n-2:0],1}            (single predecessor)
// The bit pushed out of state 1111's survivor, Q_x[n-1] of the chosen
// predecessor, is registered and is the detected bit stream. This follows
// the published path memory selector; n (PM_LEN) is left open there and
// is 32 by default here.
// Timing: the bit for the branch taken in cycle t leaves in cycle t+n+1.
// Reset clears all survivors.
module path_memory
  import prml_pkg::*;
#(
  parameter int unsigned PM_LEN = prml_pkg::PM_LEN_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_STATES-1:0] sel,      // ACS decisions, STATE_CODE order
  output logic                  bit_out   // detected bit (1 = +1)
);
  logic [PM_LEN-1:0] q [NUM_STATES];

  for (genvar s = 0; s < int'(NUM_STATES); s++) begin : g_state
    localparam logic [3:0] CODE = STATE_CODE[s];
    localparam int PA = pred_index(CODE, 1'b1);
    localparam int PB = pred_index(CODE, 1'b0);
    // With a single predecessor, it stands on input 1 (see acs).
    localparam int P1 = (PA >= 0) ? PA : PB;
    localparam int P0 = (PB >= 0) ? PB : PA;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) q[s] <= '0;
      else        q[s] <= sel[s] ? {q[P1][PM_LEN-2:0], CODE[0]}
                                 : {q[P0][PM_LEN-2:0], CODE[0]};
  end

  // Output taken from state 1111 (index 0), as in the published selector.
  localparam int S1111 = state_index(4'b1111);
  localparam int P1111 = pred_index(4'b1111, 1'b1);
  localparam int P0111 = pred_index(4'b1111, 1'b0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bit_out <= 1'b0;
    else        bit_out <= sel[S1111] ? q[P1111][PM_LEN-1] : q[P0111][PM_LEN-1];
endmodule
