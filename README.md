# jyankenunit — a two-player janken judge

Janken is the Japanese name for rock-paper-scissors. Two players each show
one of three hands: *goo* (rock), *choki* (scissors) or *paa* (paper). Rock
blunts scissors, scissors cut paper, paper wraps rock, and equal hands are a
draw (*aiko*). `jyankenunit` is the referee: it watches six input lines,
three per player, and raises one of three verdict lines, *kachi1* (player 1
wins), *kachi2* (player 2 wins) or *oaiko* (draw).

It is a small piece of pure combinational logic, originally fitted into
eleven logic cells of an Altera FLEX 8000 device (EPF8282ALC84-2). This
SystemVerilog gives the same truth table in portable, readable form.

## Interface

| Port     | Dir | Meaning                    | Original pin |
|----------|-----|----------------------------|--------------|
| `goo1`   | in  | player 1 shows rock        | 72           |
| `choki1` | in  | player 1 shows scissors    | 12           |
| `paa1`   | in  | player 1 shows paper       | 31           |
| `goo2`   | in  | player 2 shows rock        | 13           |
| `choki2` | in  | player 2 shows scissors    | 54           |
| `paa2`   | in  | player 2 shows paper       | 73           |
| `kachi1` | out | player 1 wins              | 62           |
| `kachi2` | out | player 2 wins              | 22           |
| `oaiko`  | out | draw                       | 56           |

All ports are single active-high bits. The pin numbers are the placement on
the 84-pin PLCC package and are given for reference only; the RTL carries no
placement.

There is no clock and no reset. The outputs follow the inputs after the gate
delay. If the hands come from push buttons or switches, debounce and, if a
clocked system reads the verdict, synchronise outside this unit.

## Which hands count

Each player's three lines are treated as a one-hot code. A player who holds
exactly one line high has shown a hand. Any other pattern (no line high, or
two or three high) is not a hand, and then **no verdict line is raised at
all**, whatever the other player shows. Of the 64 input patterns, 9 are
games (3 wins for each player, 3 draws) and 55 give no verdict. At most one
verdict line is ever high.

Truth table of the nine games (rows player 1, columns player 2):

|             | rock (goo2) | scissors (choki2) | paper (paa2) |
|-------------|-------------|-------------------|--------------|
| rock        | oaiko       | kachi1            | kachi2       |
| scissors    | kachi2      | oaiko             | kachi1       |
| paper       | kachi1      | kachi2            | oaiko        |

## How the verdict is computed

The original device computed each output as a two-level sum of products,
three product terms per output, each term naming all six lines (one line
high and two low for each player). That form is hard to read and hard to
change, so this RTL splits the job in two steps, both in `jyanken_pkg`:

1. `decode_hand` turns a player's three lines into a `hand_t`:
   `HAND_GOO` = 0, `HAND_CHOKI` = 1, `HAND_PAA` = 2, or `HAND_NONE` for any
   pattern that is not one-hot.
2. `judge` compares two hands. The numbering is chosen so that every hand
   beats the hand numbered one above it, modulo 3 (0 beats 1, 1 beats 2,
   2 beats 0). So with `d = (h2 - h1) mod 3`: `d = 0` is a draw, `d = 1`
   means player 1 wins, `d = 2` means player 2 wins. A `HAND_NONE` on either
   side gives `RES_NONE`.

`jyankenunit` then raises the output that matches the `result_t`. An
immediate assertion checks that no two verdicts are ever high together.

The numbering and the modulo-3 rule are this design's own choice; the
function, including the "no verdict on a bad hand" behaviour, is that of the
original fit. Synthesis reduces either form to the same small function of
six inputs.

## Files

- `rtl/jyanken_pkg.sv` — the `hand_t` and `result_t` types and the
  `decode_hand` and `judge` functions.
- `rtl/jyankenunit.sv` — the judge.
- `tb/tb_jyankenunit.sv` — self-checking testbench.

## Verification

`tb_jyankenunit` applies all 64 input patterns and checks each output twice,
against two references written independently of the RTL:

- a rule table ("rock beats scissors, scissors beat paper, paper beats
  rock", with no verdict unless both hands are one-hot);
- the original device's sum-of-products equations, rewritten as plain
  Boolean expressions.

It also counts each kind of outcome and requires exactly 3 wins for each
player, 3 draws and 55 no-verdict patterns, so a missing case is caught even
if the references agreed on it. It ends with a line
`TB_RESULT checks=N failures=M`; a watchdog stops the run with a failure if
it hangs. The run is exhaustive, so it covers the whole design at its only
size.

Run it with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/jyanken_pkg.sv rtl/jyankenunit.sv tb/tb_jyankenunit.sv \
    --top-module tb_jyankenunit
./obj_dir/Vtb_jyankenunit
```

Lint with `verilator --lint-only -Wall rtl/jyanken_pkg.sv rtl/jyankenunit.sv`.

## How far it follows the original

- Same six inputs, same three outputs, same truth table over all 64 input
  patterns (checked exhaustively).
- Not reproduced: the mapping onto the FLEX 8000's logic cells, the pin
  placement and the interconnect use; those belong to the vendor device and
  its fitter, not to the logic. The original fit used 11 of the device's
  logic cells (about 5 %) and no flip-flops.
- The original gives no timing requirement, and this RTL adds none.

## Changing it

To add a third player or a different rule, extend `judge` (a rule between
two hands is one comparison of their numbers modulo 3). To make the unit
clocked, register `kachi1`, `kachi2` and `oaiko` in the enclosing design;
nothing inside depends on a clock.
