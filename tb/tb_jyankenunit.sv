// Self-checking testbench for jyankenunit.
//
// Applies all 64 patterns of the six gesture lines and checks the three
// verdict outputs against two references built independently of the unit:
//  * a rule table: for valid one-hot hands, an explicit "what beats what"
//    list (rock > scissors, scissors > paper, paper > rock), and no verdict
//    whenever either hand is not one-hot;
//  * the two-level logic of the original FLEX 8000 fit, rewritten here as
//    plain sum-of-products expressions over the six lines.
// The unit is combinational, so each pattern is checked 1 ns after it is
// applied. Every kind of outcome (player 1 wins, player 2 wins, draw, no
// verdict) is counted, and an outcome that never occurs counts as a failure.
// A watchdog ends the run with a failure if it has not finished in 10 us.
module tb_jyankenunit;

  logic goo1, choki1, paa1, goo2, choki2, paa2;
  logic kachi1, kachi2, oaiko;

  int checks   = 0;
  int failures = 0;
  int n_win1 = 0, n_win2 = 0, n_draw = 0, n_none = 0;

  jyankenunit dut (.*);

  // Reference 1: rule table. Hand codes: 0 none/invalid, 1 rock,
  // 2 scissors, 3 paper.
  function automatic int hand_of(input logic [2:0] gcp);
    case (gcp)
      3'b100:  return 1;
      3'b010:  return 2;
      3'b001:  return 3;
      default: return 0;
    endcase
  endfunction

  function automatic logic beats(input int a, input int b);
    return (a == 1 && b == 2) || (a == 2 && b == 3) || (a == 3 && b == 1);
  endfunction

  // Reference 2: sum of products of the original device fit.
  function automatic logic [2:0] sop(input logic g1, c1, p1, g2, c2, p2);
    logic k1, k2, d;
    k1 = ( c1 & !g1 & !p1 & !g2 & !c2 &  p2)
       | (!c1 & !p2 & !c2 & !g1 &  g2 &  p1)
       | (!c1 & !p2 &  c2 &  g1 & !g2 & !p1);
    k2 = (!c1 & !g2 & !c2 &  g1 & !p1 &  p2)
       | (!c1 & !g2 &  c2 & !g1 &  p1 & !p2)
       | ( c1 & !g1 & !c2 &  g2 & !p1 & !p2);
    d  = (!g1 & !g2 & !c1 & !c2 &  p1 &  p2)
       | (!g1 & !g2 &  c1 &  c2 & !p1 & !p2)
       | (!c1 &  g1 & !c2 &  g2 & !p1 & !p2);
    return {k1, k2, d};
  endfunction

  task automatic check(input string what, input logic got, input logic exp,
                       input logic [5:0] pat);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: pattern g1c1p1=%b g2c2p2=%b got %b expected %b",
               what, pat[5:3], pat[2:0], got, exp);
    end
  endtask

  initial begin
    #10us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic [5:0] pat;
      int h1, h2;
      logic e1, e2, ed;
      logic [2:0] s;
      pat = 6'(v);
      {goo1, choki1, paa1, goo2, choki2, paa2} = pat;
      #1ns;
      h1 = hand_of(pat[5:3]);
      h2 = hand_of(pat[2:0]);
      e1 = (h1 != 0) && (h2 != 0) && beats(h1, h2);
      e2 = (h1 != 0) && (h2 != 0) && beats(h2, h1);
      ed = (h1 != 0) && (h1 == h2);
      check("kachi1", kachi1, e1, pat);
      check("kachi2", kachi2, e2, pat);
      check("oaiko",  oaiko,  ed, pat);
      s = sop(pat[5], pat[4], pat[3], pat[2], pat[1], pat[0]);
      check("kachi1 vs device logic", kachi1, s[2], pat);
      check("kachi2 vs device logic", kachi2, s[1], pat);
      check("oaiko vs device logic",  oaiko,  s[0], pat);
      if (kachi1) n_win1++;
      if (kachi2) n_win2++;
      if (oaiko)  n_draw++;
      if (!kachi1 && !kachi2 && !oaiko) n_none++;
    end
    // Nine valid games: three wins each way, three draws; 55 others.
    $display("outcomes: win1=%0d win2=%0d draw=%0d none=%0d",
             n_win1, n_win2, n_draw, n_none);
    checks++; if (n_win1 != 3)  begin failures++; $display("FAIL win1 count"); end
    checks++; if (n_win2 != 3)  begin failures++; $display("FAIL win2 count"); end
    checks++; if (n_draw != 3)  begin failures++; $display("FAIL draw count"); end
    checks++; if (n_none != 55) begin failures++; $display("FAIL none count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
