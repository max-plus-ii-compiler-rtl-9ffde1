// jyankenunit: two-player janken (rock-paper-scissors) judge.
//
// Each player drives three gesture lines: goo (rock), choki (scissors) and
// paa (paper). The unit decodes each player's lines to a hand, accepting
// only patterns with exactly one line high, and compares the two hands:
//   kachi1 - player 1 wins
//   kachi2 - player 2 wins
//   oaiko  - both show the same hand (a draw)
// At most one output is high. If either player shows no hand or more than
// one, all three stay low. The nine valid games and the "no verdict" rule
// are those of the original programmable-logic implementation, which fitted
// the same function into eleven logic cells of a FLEX 8000 device.
//
// Timing: purely combinational, no clock and no reset; outputs follow the
// inputs after the gate delay. The inputs are taken as already settled (for
// example, debounced switches); synchronising them is left to the user.
//
// The rule is written as a decode followed by a modulo-3 comparison (see
// jyanken_pkg) rather than as the device's cell-level sum of products; the
// port names follow the original pin names in lower case.
module jyankenunit
  import jyanken_pkg::*;
(
  input  logic goo1,
  input  logic choki1,
  input  logic paa1,
  input  logic goo2,
  input  logic choki2,
  input  logic paa2,
  output logic kachi1,
  output logic kachi2,
  output logic oaiko
);

  hand_t   hand1, hand2;
  result_t result;

  always_comb begin
    hand1  = decode_hand(goo1, choki1, paa1);
    hand2  = decode_hand(goo2, choki2, paa2);
    result = judge(hand1, hand2);
  end

  assign kachi1 = (result == RES_WIN1);
  assign kachi2 = (result == RES_WIN2);
  assign oaiko  = (result == RES_DRAW);

  // The three verdicts exclude one another.
  always_comb assert ($onehot0({kachi1, kachi2, oaiko}))
    else $error("jyankenunit: more than one verdict");

endmodule
