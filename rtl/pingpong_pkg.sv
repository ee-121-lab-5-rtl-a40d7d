// pingpong_pkg: types and constants shared by the ping-pong game blocks.
//
// The game is a two-player LED ping-pong: one lit LED out of eight is the
// ball, two pushbuttons are the paddles, and two saturating counters keep
// score on 7-segment displays.  This package holds the state encoding of the
// core game controller, the command set of the ball shift register and the
// player identifier.  The binary state encoding is this design's choice; the
// game may use binary or one-hot encoding equally well.
package pingpong_pkg;

  // Which player: the left one (owner of LPB and L7) or the right one.
  typedef enum logic {
    PLAYER_L = 1'b0,
    PLAYER_R = 1'b1
  } player_t;

  // Core game states.
  //   ST_SERVE_L / ST_SERVE_R : ball off, waiting for that player's paddle
  //   ST_MOVE_R               : ball travelling from L7 towards L0
  //   ST_MOVE_L               : ball travelling from L0 towards L7
  //   ST_GAME_OVER            : a player reached the winning score; frozen
  typedef enum logic [2:0] {
    ST_SERVE_L   = 3'd0,
    ST_SERVE_R   = 3'd1,
    ST_MOVE_R    = 3'd2,
    ST_MOVE_L    = 3'd3,
    ST_GAME_OVER = 3'd4
  } game_state_t;

  // Commands from the game controller to the ball shift register.
  typedef enum logic [2:0] {
    BALL_HOLD        = 3'd0,  // keep the pattern
    BALL_CLEAR       = 3'd1,  // ball disappears
    BALL_LOAD_LEFT   = 3'd2,  // ball appears at the leftmost LED (L7)
    BALL_LOAD_RIGHT  = 3'd3,  // ball appears at the rightmost LED (L0)
    BALL_SHIFT_RIGHT = 3'd4,  // one step towards L0
    BALL_SHIFT_LEFT  = 3'd5   // one step towards L7
  } ball_cmd_t;

  // Board clock: the 25 MHz oscillator of the prototyping board.
  localparam int unsigned CLK_HZ_DEFAULT   = 25_000_000;

endpackage : pingpong_pkg
