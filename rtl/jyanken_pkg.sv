// Shared types and functions of the janken (rock-paper-scissors) judge.
//
// A player's hand arrives as three separate lines, one per gesture. A hand
// is valid only when exactly one line is high; every other pattern decodes
// to HAND_NONE. The valid hands are numbered so that, modulo 3, each hand
// beats the one numbered just above it: rock (0) beats scissors (1),
// scissors (1) beats paper (2), paper (2) beats rock (0). That ordering is
// this design's own choice; it turns the win rule into one subtraction.
package jyanken_pkg;

  typedef enum logic [1:0] {
    HAND_GOO   = 2'd0,  // rock
    HAND_CHOKI = 2'd1,  // scissors
    HAND_PAA   = 2'd2,  // paper
    HAND_NONE  = 2'd3   // no hand, or more than one line high
  } hand_t;

  typedef enum logic [1:0] {
    RES_NONE = 2'd0,    // at least one hand invalid: no verdict
    RES_WIN1 = 2'd1,
    RES_WIN2 = 2'd2,
    RES_DRAW = 2'd3
  } result_t;

  // One-hot gesture lines to a hand.
  function automatic hand_t decode_hand(input logic goo, input logic choki,
                                        input logic paa);
    unique case ({goo, choki, paa})
      3'b100:  return HAND_GOO;
      3'b010:  return HAND_CHOKI;
      3'b001:  return HAND_PAA;
      default: return HAND_NONE;
    endcase
  endfunction

  // Verdict for two hands. With the numbering above, player 1 wins when
  // (h2 - h1) mod 3 == 1 and player 2 wins when it is 2.
  function automatic result_t judge(input hand_t h1, input hand_t h2);
    logic [2:0] diff;
    if (h1 == HAND_NONE || h2 == HAND_NONE) return RES_NONE;
    diff = 3'(h2) + 3'd3 - 3'(h1);         // 1 .. 5, never negative
    if (diff >= 3'd3) diff = diff - 3'd3;  // mod 3
    unique case (diff)
      3'd0:    return RES_DRAW;
      3'd1:    return RES_WIN1;
      default: return RES_WIN2;
    endcase
  endfunction

endpackage
