# LED ping-pong

A two-player ping-pong game for a small FPGA board. A row of eight LEDs is the
table: exactly one LED is lit, and that is the ball. Each player has one
pushbutton, the paddle. The ball crosses the row one LED at a time. The player
at the far end must press their paddle while the ball is on their end LED,
not before and not after. A good press sends the ball back. A press that is
too early, or no press before the ball falls off the end, loses the point.
Two 7-segment digits show the scores. The first player to reach 9 wins: the
game freezes and the winner's digit blinks until reset.

Everything is synchronous to the single 25 MHz board clock. No clock is
gated, and reset is synchronous.

## Pins

| Port      | Dir | Width | Meaning |
|-----------|-----|-------|---------|
| `clock`   | in  | 1 | 25 MHz board clock |
| `reset`   | in  | 1 | synchronous master reset, active high |
| `lpb`     | in  | 1 | left paddle button, active high, may be asynchronous |
| `rpb`     | in  | 1 | right paddle button, same |
| `led`     | out | 8 | ball; `led[7]` is L7, the leftmost LED, and `led[0]` is L0, the rightmost |
| `sl`      | out | 7 | left score digit, bit 0 = segment a ... bit 6 = segment g, active high |
| `sr`      | out | 7 | right score digit, same coding |
| `score_l`, `score_r` | out | 4 | binary scores |

`led`, `score_l` and `score_r` carry what a separate VGA display unit needs
to draw the same ball and scores on a monitor. That unit is not part of this
RTL. It must follow the LEDs and the displays exactly, so it can be checked
against them.

## Rules of play

The rules are the same for both players. L is the left player and R the
right player.

1. The game always knows whose turn it is. After reset it is L's turn.
2. On L's turn the LEDs are dark. L presses the left paddle, the ball
   appears on L7, and it starts moving right. R's paddle does nothing
   while the game waits for L.
3. While the ball moves right, L's paddle is ignored. R must press while
   the ball is on L0. The ball then turns and moves left, and it is L's
   job to return it on L7.
4. R loses the rally in two cases: R presses while the ball is anywhere
   other than L0, or the ball's time on L0 runs out with no press. The ball
   vanishes, L scores, and L has the next turn. All of this mirrors for L.
5. When a score reaches 9, the game freezes. The LEDs stay dark, both
   paddles are ignored, and the winner's digit blinks. Only `reset` starts a
   new game.

### Hit window and timing

The ball moves one LED every `TICK_DIV` clocks. The default is
25 MHz / 8 = 3,125,000 clocks, so the ball takes 0.125 s per LED and about
one second to cross the row.

The hit window is the whole time the ball sits on the end LED. That is
exactly one step period, so 125 ms at the default speed. The ball "falls
off" on the next step tick if there was no press.

A serve restarts the step timer. This gives the first LED a full step too.
A return does not restart the timer: the ball turns round on the next
regular tick.

If a press and a step tick arrive in the same clock, the press counts.

A button reaches the state machine three clocks after its pin rises: two
clocks to synchronise it and one to detect the edge. The effect shows on
the LEDs one clock later. A serve therefore lights its end LED four clocks
after the press.

A held button counts as one press, on its rising edge. A player cannot
park on the paddle and wait. There is no contact debouncing beyond the
synchroniser, so a bouncing switch can produce extra presses. They do no
harm. A player's paddle is ignored from the moment they serve or return
the ball until it comes back to them, and every bounce falls inside that
time.

### Optional serving rules (`SERVE_RULES = 1`)

This is closer to real table-tennis scoring. The player who starts the
rally is the server, and L serves first.

* If the receiver misses, the server scores and serves again.
* If the server misses, nobody scores and the serve passes to the other
  player.

The default, `SERVE_RULES = 0`, uses the basic rules above.

### Single-player game

To play alone as L, wire `rpb` to `led[0]` outside the chip. The right
paddle then "presses" itself the moment the ball reaches L0, so R returns
every ball perfectly. This is a single wire, and the RTL does not change.
The end-to-end testbench plays several rallies this way.

## Structure

```
pingpong_top
 ├─ button_sync  u_lpb, u_rpb   2-flop synchroniser + rising-edge detector per paddle
 ├─ tick_gen     u_tick         ball-step divider (TICK_DIV) and blink wave (FLASH_TICKS)
 ├─ game_fsm     u_fsm          the game controller
 ├─ ball_shifter u_ball         8-bit bidirectional shift register = the ball
 ├─ score_counter u_score_l/_r  4-bit counters that stop at 9
 └─ seg7_decoder u_seg_l/_r     digit → segments, with blanking for the blink
```

Shared types are in `rtl/pingpong_pkg.sv`:

* `player_t` names a player.
* `game_state_t` lists the controller states.
* `ball_cmd_t` is the command set of the ball register.

### The game controller (`game_fsm`)

This is the heart of the design. It has five states:

| State | LEDs | Listens to | Leaves on |
|-------|------|------------|-----------|
| `ST_SERVE_L` | dark | LPB | LPB → load L7, `ST_MOVE_R`; a score at 9 → `ST_GAME_OVER` |
| `ST_SERVE_R` | dark | RPB | mirror |
| `ST_MOVE_R`  | ball | RPB, tick | RPB on L0 → `ST_MOVE_L` (hit); RPB elsewhere or a tick on L0 → point, serve state |
| `ST_MOVE_L`  | ball | LPB, tick | mirror |
| `ST_GAME_OVER` | dark | nothing | reset only |

On every clock the controller issues one command to the ball register:

* hold;
* clear;
* load the ball at L7, or at L0;
* shift one place right, or one place left.

It also pulses `inc_l` or `inc_r` for a point. It does not count positions
itself. It reads `at_left` and `at_right` from the ball register and
`won_l` and `won_r` from the counters.

When a point is won, the score counter updates and the controller moves to
the next serve state on the same clock edge. On the following clock, the
serve state sees the counter at 9 and moves to `ST_GAME_OVER`. The game
therefore stops one clock after the winning point.

Under the serving rules, one extra flop holds the server of the current
rally.

The state encoding is binary. A one-hot encoding would work equally well.
Assertions check two things: that both players never score in the same
clock, and that the game-over state is never left without reset.

### Ball register (`ball_shifter`)

This is a plain shift register with a load at each end. A bit shifted past
either end is lost, and it does not wrap round. In normal play the
controller clears the ball before that can happen. An assertion checks that
at most one LED is ever lit.

### Scores and displays

The counters are 4 bits wide and ignore increments once they reach 9.

The decoder also handles the hex digits A to F, although play never shows
them.

`tick_gen` makes the blink wave. It toggles every `FLASH_TICKS` ball steps:
every 2 steps by default, which gives a 2 Hz blink. While the game is over,
the winner's digit is blanked during the low half of that wave. The loser's
digit stays lit.

For a common-anode display, set `SEG_ACTIVE_LOW = 1`.

## Parameters of `pingpong_top`

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `CLK_HZ` | 25,000,000 | board clock |
| `TICK_DIV` | `CLK_HZ/8` | clocks per ball step (speed) |
| `FLASH_TICKS` | 2 | ball steps per half-period of the winner's blink |
| `N_LEDS` | 8 | LEDs in the row |
| `WIN_SCORE` | 9 | winning score (must fit in 4 bits) |
| `SERVE_RULES` | 0 | 0 = basic turn rules, 1 = serving rules |
| `SEG_ACTIVE_LOW` | 0 | segment polarity |

## What is specified and what was chosen

These points come from the game's specification:

* eight LEDs with L7 on the left;
* two paddle buttons;
* a synchronous reset;
* a 25 MHz clock;
* the rules of play and of serving;
* 4-bit scores limited to 9;
* the frozen, blinking end of game;
* a single state machine with no gated clock.

These are choices made in this design:

* the ball speed (`TICK_DIV`) and the blink rate;
* active-high buttons and segments, and the segment bit order;
* edge-detected presses and the synchroniser;
* that a press wins a tie with a step tick;
* dark LEDs while waiting for a serve;
* restarting the step timer on a serve;
* L taking the first turn under the basic rules;
* using the whole end-LED step as the hit window.

The VGA display unit and the exact 7-segment wiring of the target board
are outside this RTL. The board's own display drivers may expect a
different segment order or polarity. `SEG_ACTIVE_LOW` covers polarity; a
different order needs a change to the table in `seg7_decoder`.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it shows |
|-----------|---------------|
| `button_sync_tb` | The pulse comes exactly 3 clocks after each rising edge, for a random button waveform. A long hold gives a single pulse. |
| `tick_gen_tb` | Ticks are exactly `DIV` clocks apart, with random restarts. The blink toggles on every `FLASH_TICKS`-th tick. |
| `ball_shifter_tb` | Random commands match a position model. Balls fall off both ends. |
| `score_counter_tb` | Random increments stop at 9. |
| `seg7_decoder_tb` | All 16 digits are right, blanked and unblanked, in both polarities. |
| `game_fsm_tb` | Both rule sets run side by side against an event-level reference model for about 75,000 clocks and 12 games each. Every serve, hit, early press, fall-off, no-point server miss and game over is checked. |
| `pingpong_top_tb` | Whole games run through the pins at `TICK_DIV = 16`. |
| `pingpong_top_full_tb` | One full rally at the default parameters, about 50 million clocks. |

`pingpong_top_tb` checks these points:

* serve latency;
* exact step spacing;
* the dwell on the end LED;
* returns and early presses by both players;
* a paddle that is ignored;
* the single-player wiring;
* a game played to 9;
* the freeze after game over, the blink period and the steady loser digit;
* the serving rules;
* a reset into a new game.

It counts each of these mechanisms and fails if any of them never happens.

`pingpong_top_full_tb` plays one rally at the default parameters: a serve, a
return, and a miss. It checks every step at exactly 3,125,000 clocks and the
final 0–1 score on both the counters and the displays. It takes about half a
minute in Verilator.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module pingpong_top_tb \
    -y rtl -y tb +libext+.sv rtl/pingpong_pkg.sv tb/pingpong_top_tb.sv
./obj_dir/Vpingpong_top_tb
```

Replace the top module and the testbench file to run another one. The
package must come first on the command line. The other modules are found
through `-y`.
