// ball_shifter: the shift register whose single lit bit is the ping-pong ball.
//
// Bit N-1 drives the leftmost LED (L7) and bit 0 the rightmost (L0).  The game
// controller issues one command per clock: hold, clear (ball disappears), load
// the ball at either end (a serve), or shift one place towards L0 or towards
// L7.  A bit shifted past an end is lost, so the pattern never wraps.  The
// flags `at_left` and `at_right` tell the controller the ball sits on an end
// LED, where a paddle press counts as a hit.  The pattern holds at most one
// lit bit; an assertion checks it.
//
// Interface: clk, rst (synchronous, clears the LEDs), cmd -> led[N-1:0],
// at_left, at_right.  Timing: the command takes effect at the next clock edge.
module ball_shifter
  import pingpong_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  ball_cmd_t    cmd,
  output logic [N-1:0] led,
  output logic         at_left,
  output logic         at_right
);

  always_ff @(posedge clk) begin
    if (rst) begin
      led <= '0;
    end else begin
      unique case (cmd)
        BALL_HOLD:        led <= led;
        BALL_CLEAR:       led <= '0;
        BALL_LOAD_LEFT:   led <= {1'b1, {(N-1){1'b0}}};
        BALL_LOAD_RIGHT:  led <= {{(N-1){1'b0}}, 1'b1};
        BALL_SHIFT_RIGHT: led <= led >> 1;
        BALL_SHIFT_LEFT:  led <= led << 1;
        default:          led <= led;
      endcase
    end
  end

  assign at_left  = led[N-1];
  assign at_right = led[0];

  a_one_ball: assert property (@(posedge clk) disable iff (rst) $onehot0(led))
    else $error("ball_shifter: more than one LED lit: %b", led);

endmodule : ball_shifter
