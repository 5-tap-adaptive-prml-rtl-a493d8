// prml_pkg: constants, types and trellis helper functions shared by the
// 5-tap (PR(a,b,c,d,e)) adaptive PRML read channel.
//
// Conventions used throughout:
//  * A detected channel bit is 1 for +1 and 0 for -1.
//  * A 5-bit branch pattern p holds five consecutive bits, p[4] the oldest
//    and p[0] the newest. Its ideal level is
//        a*s(p[4]) + b*s(p[3]) + c*s(p[2]) + d*s(p[1]) + e*s(p[0]),
//    with s(1)=+1, s(0)=-1.
//  * With a 2T minimum run length only 16 patterns are legal. They are
//    numbered 0..15 in the order PA8, PA7, PA6, PA5, PA4, PA3, PA2, PA1,
//    NA1, ..., NA8 (PA8 = a+b+c+d+e, NA8 = -a-b-c-d-e), which is also the
//    input order of the level multiplexer in the level error detector.
//  * A trellis state is the last four bits, s[3] oldest. Ten states are
//    legal. A branch from state q to state s carries pattern {q[3], s}.
// The level names, the 16-level list and the state count follow the
// published architecture; the word widths are this design's choice.
package prml_pkg;

  localparam int unsigned ADC_W      = 8;   // RF sample width (signed)
  localparam int unsigned EQ_W       = 8;   // equalizer output width (signed)
  localparam int unsigned LVL_W      = 8;   // reference level width (signed)
  localparam int unsigned ERR_W      = 9;   // level error width (signed)
  localparam int unsigned BM_W       = 9;   // branch metric width (unsigned)
  localparam int unsigned SM_W_DEF   = 14;  // state metric width (unsigned)
  localparam int unsigned COEF_W     = 16;  // FIR tap weight width (signed)
  localparam int unsigned COEF_FRAC  = 10;  // fraction bits of a tap weight
  localparam int unsigned NUM_TAPS   = 11;  // FIR length
  localparam int unsigned NUM_LEVELS = 16;  // reference levels
  localparam int unsigned NUM_STATES = 10;  // trellis states
  localparam int unsigned PM_LEN_DEF = 32;  // path memory length n

  typedef logic signed [LVL_W-1:0] level_t;
  typedef level_t level_vec_t [NUM_LEVELS];

  // Level names in multiplexer order.
  typedef enum logic [3:0] {
    PA8, PA7, PA6, PA5, PA4, PA3, PA2, PA1,
    NA1, NA2, NA3, NA4, NA5, NA6, NA7, NA8
  } level_e;

  typedef struct packed {
    logic   valid;
    level_e idx;
  } level_sel_t;

  // Bit pattern of each level, index = level number.
  localparam logic [4:0] LEVEL_PAT [NUM_LEVELS] = '{
    5'b11111, 5'b11110, 5'b11100, 5'b11001, 5'b11000, 5'b10011, 5'b10001, 5'b10000,
    5'b01111, 5'b01110, 5'b01100, 5'b00111, 5'b00110, 5'b00011, 5'b00001, 5'b00000
  };

  // Legal states, in the order of the trellis drawing (top to bottom).
  localparam logic [3:0] STATE_CODE [NUM_STATES] = '{
    4'b1111, 4'b1110, 4'b1100, 4'b1001, 4'b1000,
    4'b0111, 4'b0110, 4'b0011, 4'b0001, 4'b0000
  };

  // Map a 5-bit pattern to its level; valid=0 for a pattern that breaks
  // the 2T run-length rule.
  function automatic level_sel_t pat_to_level(input logic [4:0] p);
    level_sel_t r;
    r.valid = 1'b1;
    unique case (p)
      5'b11111: r.idx = PA8;
      5'b11110: r.idx = PA7;
      5'b11100: r.idx = PA6;
      5'b11001: r.idx = PA5;
      5'b11000: r.idx = PA4;
      5'b10011: r.idx = PA3;
      5'b10001: r.idx = PA2;
      5'b10000: r.idx = PA1;
      5'b01111: r.idx = NA1;
      5'b01110: r.idx = NA2;
      5'b01100: r.idx = NA3;
      5'b00111: r.idx = NA4;
      5'b00110: r.idx = NA5;
      5'b00011: r.idx = NA6;
      5'b00001: r.idx = NA7;
      5'b00000: r.idx = NA8;
      default: begin r.valid = 1'b0; r.idx = PA8; end
    endcase
    return r;
  endfunction

  // Position of a state code in STATE_CODE, or -1.
  function automatic int state_index(input logic [3:0] code);
    for (int i = 0; i < int'(NUM_STATES); i++)
      if (STATE_CODE[i] == code) return i;
    return -1;
  endfunction

  // Predecessor of state s whose oldest bit is `first` (1 -> ACS input 1,
  // 0 -> ACS input 0): -1 when that branch is not in the trellis.
  function automatic int pred_index(input logic [3:0] s, input logic first);
    logic [4:0] p;
    p = {first, s};
    if (!pat_to_level(p).valid) return -1;
    return state_index({first, s[3:1]});
  endfunction

  // Level number carried by the branch into state s from the predecessor
  // whose oldest bit is `first`.
  function automatic int branch_level(input logic [3:0] s, input logic first);
    return int'(pat_to_level({first, s}).idx);
  endfunction

  // Ideal PR(a,b,c,d,e) level of level number idx.
  function automatic int ideal_level(input logic [3:0] idx, input int a, input int b,
                                     input int c, input int d, input int e);
    logic [4:0] p;
    p = LEVEL_PAT[idx];
    return (p[4] ? a : -a) + (p[3] ? b : -b) + (p[2] ? c : -c) +
           (p[1] ? d : -d) + (p[0] ? e : -e);
  endfunction

endpackage
