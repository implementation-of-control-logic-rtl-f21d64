# Two-button tennis scoreboard

A tennis umpire normally keeps a scoreboard up to date with separate controls
for points, games and sets of each player. This design reduces that to two
point buttons, one per player, plus a reset: the umpire only says who won the
rally, and the logic works out everything else, including deuce, advantage,
the tie-break, the end of a set and the end of the match. It drives six
7-segment displays: two digits of points per player, one digit of games and
one digit of sets per player.

The chip has 60 pins: `clk`, `rst`, `sw_a`, `sw_b` in, and 56 segment lines
out. Everything is synchronous to one clock; the intended clock is 50 MHz,
although the logic is a few dozen flip-flops and would run far faster.

## Scoring as implemented

| level      | range shown              | won when                                              |
|------------|--------------------------|-------------------------------------------------------|
| point      | 00, 15, 30, 40, A        | 4+ points and 2 ahead (game)                           |
| tie-break  | 00 .. 15                 | 7+ points and 2 ahead (game, and with it the set 7-6) |
| game       | 0 .. 6                   | 6 games and 2 ahead, or 7 games (set)                 |
| set        | 0 .. 2                   | 2 sets (match; the board then ignores both buttons)   |

The tie-break starts when both players have six games. A set ends at 6-0 to
6-4, at 7-5, or at 7-6 after the tie-break. When a game or set is won, the
counters below it restart from zero for both players.

Two presses in the same clock cycle are ignored: only one player can score
at a time. After a player has two sets, presses do nothing until `rst`.

## Structure

```
 sw_a ─ button_player ─┐  (pulse, masked if both or match over)
 sw_b ─ button_player ─┤
                       ├─ not 6-6 ─ counter_point A ⇄ counter_point B ───┐ game pulses
                       └─ 6-6 ───── counter_point_tiebreak A ⇄ B ────────┤
                                                                          ▼
          counter_game A ⇄ counter_game B ── set pulses ── counter_set A, B ── p2_out ─► match over
                │ is6 & is6 = out_6_6 (tie-break phase)
 point_mux A/B (regular or tie-break count) ─ display_point A/B ─ disp_point_a/b (14 bits each)
 display_digit ×4 ─ disp_game_a/b, disp_set_a/b (7 bits each)
```

Each counter exists once per player, and the two copies of a pair look at
each other (⇄). The top module, `tennis_scoreboard`, holds only the glue
logic: pulse gating, the 6-6 detector, the reset fan-out and the match-over
mask.

### The regular point counter pair (`counter_point`)

This is the part that needs the most care. Each player's counter is a 3-bit
register `res` holding 0..4, which stands for 00, 15, 30, 40 and advantage.
It exports two flags, `p40_out` (res is 40) and `a_out` (res is A), which
become the other counter's `p40_in` and `a_in`. On a clock edge:

1. `game` is cleared (it is a one-clock pulse).
2. `rst` clears `res`.
3. A point for this player wins the game if `res` is A, or if `res` is 40
   and the other player has neither 40 nor A. `res` returns to 00 and
   `game` pulses.
4. Otherwise the point adds one to `res`, except when the other player holds
   the advantage: then this counter stays at 40 while the other counter
   steps back from A to 40 (rule 5). That is deuce.
5. A point for the other player while this player holds A takes `res` back
   to 40.

So 40-40 is deuce, a point from deuce gives A-40, and the next point either
wins the game or returns both to 40-40. The condition "and the other player
has no advantage" in rule 3 is essential. Without it, a player at 40 facing
the other's advantage would win the game with a single point, because the
other's 40 flag is low while it shows A.

### Tie-break counters (`counter_point_tiebreak`)

These are 4-bit counts, 0..15, compared with each other: a point wins when the
new count is at least 7 and at least 2 more than the other player's. A
tie-break has no upper limit, so something must happen at the top of the
range. A point that would level the score at 15-15 leaves both counters at
14-14 instead. From then on only the difference matters, so the outcome is
unchanged; only the displayed numbers stop climbing.

### Game and set counters

`counter_game` counts games (3 bits) and compares with the other player's
count to apply the two-game lead at six. It pulses `set` when the set is won
and clears in the same edge, so the winning 6 or 7 is never displayed.
`is6` from both players gives `out_6_6`, which steers the next presses to
the tie-break counters and switches the point displays to tie-break counts.
`counter_set` counts sets (2 bits, holds at 2), and its `p2_out` flag marks
the match winner.

### Reset fan-out

| counter             | cleared by                                     |
|---------------------|------------------------------------------------|
| point, tie-break    | `rst`, or any game pulse from either player    |
| game                | `rst`, or any set pulse from either player     |
| set, buttons        | `rst` only                                     |

The winner's counter clears itself in the edge that wins. The loser's
counter clears one clock later, from the registered pulse.

### Displays

All segment outputs are active low, in the bit order `{g,f,e,d,c,b,a}`:
`0` is `1000000`, `1` is `1111001`, `6` is `0000010`. A point display is
`{tens digit, units digit}`. Advantage shows as a dark tens digit and the
letter A. In the tie-break, points show in decimal with a leading zero
(`06`). `point_mux` chooses regular or tie-break values and converts them to
digit codes. `display_point` and `display_digit` turn the codes into segments.

## Timing

If a press is first sampled at rising edge k:

| edge | what happens                                                   |
|------|----------------------------------------------------------------|
| k+1  | press has passed the 2-stage synchronizer; one-clock pulse     |
| k+2  | point counted, scorer's point display changes                  |
| k+3  | game counted, loser's points cleared                           |
| k+4  | set counted, loser's games cleared                             |

Presses must be at least five clocks apart, which any human press is. A
button held down scores once. The buttons are assumed to be debounced before
they reach the chip. `rst` is synchronous, active high, and assumed to be
already synchronous to `clk`.

## Where this departs from, or goes beyond, the original design

The original design is a tennis scoreboard chip that was built both as a
standard-cell macro and on an FPGA. This RTL follows its block diagram, its
point-counter algorithm, its point coding and its pin count. The following
are deliberate differences or choices made here:

- **Deuce fix in the point counter.** The published point algorithm tests
  only the other player's 40 flag before granting the game at 40. Rule 3
  above adds the advantage test so that deuce works.
- **Set rule.** The original states that six games win a set, and also that
  a tie-break is played at 6-6. Both cannot hold. This design uses the
  standard rule: six games with a lead of two, otherwise seven.
- **Tie-break past 15.** The original gives a 0..15 range and no rule for
  overflow. The 15-15 → 14-14 fold is this design's own.
- **Button block.** The original says only that a press produces one pulse.
  The two-flop synchronizer and edge detector, the same-cycle-press rule and
  the match-over mask are this design's own reading.
- **Display details.** The look of advantage, the segment patterns for
  digits whose patterns the original does not show, and the blanking of
  unused codes are this design's choices.
- **Register count.** This design has 36 flip-flops; the FPGA build of the
  original reports 32. The extra ones are synchronizer and pulse registers.

Not covered: the buttons or joystick and the LED displays themselves, which
are outside the chip. No timing or area analysis was done against a
cell library.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tennis_scoreboard_tb` plays 41 complete matches through the top-level
  pins. It compares all six displays, bit for bit, with an independent
  integer model of the tennis rules after every press. It also checks the
  two-edge point latency, simultaneous presses, presses after the match and
  reset in mid-match. It counts each mechanism and fails if any never
  occurred: deuce, advantage, advantage lost, game from advantage, straight
  game, tie-break entered, won and past 15, sets 6-x, 7-5 and 7-6, match
  won. It runs the design at its only configuration.
- The counter testbenches run cross-coupled pairs, wired as in the top,
  against rule-based models with thousands of random points. Scripted
  sequences cover the edge cases.
- The display and multiplexer testbenches check every input code against
  hand-written segment tables.

Run one with Verilator, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/tennis_pkg.sv tb/tennis_scoreboard_tb.sv --top-module tennis_scoreboard_tb
./obj_dir/Vtennis_scoreboard_tb
```

Replace the testbench name to run another. The end-to-end run takes about
15 seconds, most of it compilation.

## Files

| file                              | contents                                    |
|-----------------------------------|---------------------------------------------|
| `rtl/tennis_pkg.sv`               | point code enum, widths, rule constants, digit types |
| `rtl/tennis_scoreboard.sv`        | top level                                   |
| `rtl/button_player.sv`            | press → one-clock pulse                     |
| `rtl/counter_point.sv`            | regular points with deuce/advantage         |
| `rtl/counter_point_tiebreak.sv`   | tie-break points                            |
| `rtl/counter_game.sv`             | games, set pulse, six-game flag             |
| `rtl/counter_set.sv`              | sets, match-won flag                        |
| `rtl/point_mux.sv`                | regular/tie-break selection and digit conversion |
| `rtl/display_point.sv`            | two-digit point display                     |
| `rtl/display_digit.sv`            | one 7-segment digit                         |
| `tb/*_tb.sv`                      | one testbench per module                    |

## Changing it

The rule constants live in `tennis_pkg` and feed the default parameter
values of the counters. Examples are the tie-break target (7), the lead (2),
the games per set (6) and the sets per match (2). The top uses the package
values directly. Widening `TB_W` raises the point at which a long tie-break
folds its display. The point display then needs more digits, because
`point_mux` assumes counts below 20.
