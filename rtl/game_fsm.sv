// game_fsm: the core state machine of the ping-pong game.
//
// It decides whose turn it is, which way the ball travels, whether a paddle
// press is a hit or a miss, who scores, and when the game is over.  It drives
// the ball shift register with one command per clock and pulses one score
// counter's increment for each point.
//
// Basic rules (SERVE_RULES = 0, the default):
//   * In ST_SERVE_L only LPB counts: a press loads the ball at L7 and the
//     ball starts moving right (ST_MOVE_R).  ST_SERVE_R mirrors this.
//   * While the ball moves right, LPB is ignored.  An RPB press while the
//     ball sits on L0 is a hit: the direction turns and the next tick moves
//     the ball towards L7.  An RPB press anywhere else (too soon), or a tick
//     while the ball sits on L0 with no hit (the ball falls off), is a miss:
//     the ball disappears, L scores and it is L's turn next.  Moving left
//     mirrors this.
//   * When a score reaches the winning value the machine enters
//     ST_GAME_OVER and ignores both paddles until reset.
// Optional serving rules (SERVE_RULES = 1): the player whose turn it is
// serves.  When the receiver misses, the server scores and serves again;
// when the server misses, nobody scores and the other player serves.
// In both rule sets L has the first turn after reset.
//
// A press and a tick in the same cycle resolve in favour of the press.  The
// tick counter is restarted on each serve so the ball rests a full tick on
// its first LED.  Rules, start player and game-over freeze follow the game
// description; the press-over-tick priority, blank LEDs while waiting for a
// serve and the restart on serve are this design's choices.
//
// Interface: clk, rst (synchronous), lpb_press/rpb_press (1-cycle pulses),
// tick (1-cycle pulse per ball step), at_left/at_right (ball on an end LED),
// won_l/won_r (score counter at its maximum) -> ball_cmd, inc_l/inc_r
// (1-cycle point pulses), tick_restart, state, winner, game_over.
// Timing: every decision is made in the cycle its press or tick arrives and
// appears on the ball and scores at the next edge; game over follows one
// clock after the winning point is counted.
module game_fsm
  import pingpong_pkg::*;
#(
  parameter bit SERVE_RULES = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        lpb_press,
  input  logic        rpb_press,
  input  logic        tick,
  input  logic        at_left,
  input  logic        at_right,
  input  logic        won_l,
  input  logic        won_r,
  output ball_cmd_t   ball_cmd,
  output logic        inc_l,
  output logic        inc_r,
  output logic        tick_restart,
  output game_state_t state,
  output player_t     winner,
  output logic        game_over
);

  game_state_t state_n;
  player_t     server, server_n;   // who started the current rally
  logic        miss;               // the player `misser` lost the rally
  player_t     misser;

  // Next state and commands.
  always_comb begin
    state_n      = state;
    server_n     = server;
    ball_cmd     = BALL_HOLD;
    tick_restart = 1'b0;
    miss         = 1'b0;
    misser       = PLAYER_L;

    unique case (state)
      ST_SERVE_L: begin
        if (won_l || won_r) begin
          state_n = ST_GAME_OVER;
        end else if (lpb_press) begin
          ball_cmd     = BALL_LOAD_LEFT;
          tick_restart = 1'b1;
          server_n     = PLAYER_L;
          state_n      = ST_MOVE_R;
        end
      end
      ST_SERVE_R: begin
        if (won_l || won_r) begin
          state_n = ST_GAME_OVER;
        end else if (rpb_press) begin
          ball_cmd     = BALL_LOAD_RIGHT;
          tick_restart = 1'b1;
          server_n     = PLAYER_R;
          state_n      = ST_MOVE_L;
        end
      end
      ST_MOVE_R: begin
        if (rpb_press) begin
          if (at_right) state_n = ST_MOVE_L;            // hit: turn round
          else begin miss = 1'b1; misser = PLAYER_R; end // too soon
        end else if (tick) begin
          if (at_right) begin miss = 1'b1; misser = PLAYER_R; end // fell off
          else ball_cmd = BALL_SHIFT_RIGHT;
        end
      end
      ST_MOVE_L: begin
        if (lpb_press) begin
          if (at_left) state_n = ST_MOVE_R;
          else begin miss = 1'b1; misser = PLAYER_L; end
        end else if (tick) begin
          if (at_left) begin miss = 1'b1; misser = PLAYER_L; end
          else ball_cmd = BALL_SHIFT_LEFT;
        end
      end
      ST_GAME_OVER: begin
        ball_cmd = BALL_CLEAR;
      end
      default: state_n = ST_SERVE_L;
    endcase

    inc_l = 1'b0;
    inc_r = 1'b0;
    if (miss) begin
      ball_cmd = BALL_CLEAR;
      if (!SERVE_RULES) begin
        // The other player scores and takes the next turn.
        if (misser == PLAYER_R) begin inc_l = 1'b1; state_n = ST_SERVE_L; end
        else                    begin inc_r = 1'b1; state_n = ST_SERVE_R; end
      end else if (misser != server) begin
        // Receiver missed: the server scores and serves again.
        if (server == PLAYER_L) begin inc_l = 1'b1; state_n = ST_SERVE_L; end
        else                    begin inc_r = 1'b1; state_n = ST_SERVE_R; end
      end else begin
        // Server missed: no point, the serve passes over.
        state_n = (server == PLAYER_L) ? ST_SERVE_R : ST_SERVE_L;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= ST_SERVE_L;
      server <= PLAYER_L;
    end else begin
      state  <= state_n;
      server <= server_n;
    end
  end

  assign game_over = (state == ST_GAME_OVER);
  assign winner    = won_r ? PLAYER_R : PLAYER_L;

  a_one_point: assert property (@(posedge clk) disable iff (rst) !(inc_l && inc_r))
    else $error("game_fsm: both players scored in one cycle");
  a_frozen: assert property (@(posedge clk) disable iff (rst)
                             game_over |=> game_over && !inc_l && !inc_r)
    else $error("game_fsm: left game over without reset");

endmodule : game_fsm
