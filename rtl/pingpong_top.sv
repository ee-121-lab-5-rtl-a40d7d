// pingpong_top: the complete LED ping-pong game.
//
// Eight LEDs (led[7] = L7 leftmost ... led[0] = L0 rightmost) show the ball,
// two pushbuttons (lpb, rpb) are the paddles, and two 7-segment displays
// (sl, sr) show the scores.  Inside, each paddle goes through a synchroniser
// and edge detector (button_sync), a clock divider makes the ball-step tick
// and the flash wave (tick_gen), the core state machine (game_fsm) drives the
// ball shift register (ball_shifter) and two saturating score counters
// (score_counter), and two decoders (seg7_decoder) drive the displays.  Once
// a player reaches WIN_SCORE the game freezes and that player's digit blinks
// until reset.  The binary scores are also brought out (score_l, score_r) so
// that, with led, they can feed an external VGA display macro that draws the
// same ball and scores on a monitor; that macro is not part of this design.
//
// All state is clocked by `clock` with a synchronous, active-high `reset`;
// no clock is gated.  The pin set, 25 MHz clock, eight LEDs and the limit
// of 9 follow the game description; the ball speed (TICK_DIV), blink rate,
// button polarity and segment coding are this design's choices.
//
// Single-player play: wiring rpb to led[0] makes the right paddle press
// itself the moment the ball reaches L0, so R always returns perfectly.
//
// Timing: a paddle press reaches the state machine 3 clocks after the pin
// rises; the ball moves one LED every TICK_DIV clocks.
module pingpong_top
  import pingpong_pkg::*;
#(
  parameter int unsigned CLK_HZ      = CLK_HZ_DEFAULT,
  parameter int unsigned TICK_DIV    = CLK_HZ / 8,
  parameter int unsigned FLASH_TICKS = 2,
  parameter int unsigned N_LEDS      = 8,
  parameter int unsigned WIN_SCORE   = 9,
  parameter bit          SERVE_RULES = 1'b0,
  parameter bit          SEG_ACTIVE_LOW = 1'b0
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              lpb,
  input  logic              rpb,
  output logic [N_LEDS-1:0] led,
  output logic [6:0]        sl,
  output logic [6:0]        sr,
  output logic [3:0]        score_l,
  output logic [3:0]        score_r
);

  logic        lpb_press, rpb_press;
  logic        tick, flash, tick_restart;
  logic        at_left, at_right, won_l, won_r, inc_l, inc_r, game_over;
  ball_cmd_t   ball_cmd;
  game_state_t state;
  player_t     winner;

  button_sync u_lpb (.clk(clock), .rst(reset), .btn(lpb), .press(lpb_press));
  button_sync u_rpb (.clk(clock), .rst(reset), .btn(rpb), .press(rpb_press));

  tick_gen #(.DIV(TICK_DIV), .FLASH_TICKS(FLASH_TICKS)) u_tick (
    .clk(clock), .rst(reset), .restart(tick_restart), .tick(tick), .flash(flash)
  );

  game_fsm #(.SERVE_RULES(SERVE_RULES)) u_fsm (
    .clk(clock), .rst(reset),
    .lpb_press(lpb_press), .rpb_press(rpb_press), .tick(tick),
    .at_left(at_left), .at_right(at_right), .won_l(won_l), .won_r(won_r),
    .ball_cmd(ball_cmd), .inc_l(inc_l), .inc_r(inc_r), .tick_restart(tick_restart),
    .state(state), .winner(winner), .game_over(game_over)
  );

  ball_shifter #(.N(N_LEDS)) u_ball (
    .clk(clock), .rst(reset), .cmd(ball_cmd), .led(led), .at_left(at_left), .at_right(at_right)
  );

  score_counter #(.WIDTH(4), .MAX(WIN_SCORE)) u_score_l (
    .clk(clock), .rst(reset), .inc(inc_l), .count(score_l), .at_max(won_l)
  );
  score_counter #(.WIDTH(4), .MAX(WIN_SCORE)) u_score_r (
    .clk(clock), .rst(reset), .inc(inc_r), .count(score_r), .at_max(won_r)
  );

  // The winner's digit blinks once the game is over.
  logic blank_l, blank_r;
  assign blank_l = game_over && (winner == PLAYER_L) && !flash;
  assign blank_r = game_over && (winner == PLAYER_R) && !flash;

  seg7_decoder #(.ACTIVE_LOW(SEG_ACTIVE_LOW)) u_seg_l (.digit(score_l), .blank(blank_l), .seg(sl));
  seg7_decoder #(.ACTIVE_LOW(SEG_ACTIVE_LOW)) u_seg_r (.digit(score_r), .blank(blank_r), .seg(sr));

endmodule : pingpong_top
