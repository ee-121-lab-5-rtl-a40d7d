// ball_shifter_tb: self-checking test of the ball shift register.
//
// Random commands drive the block; the testbench tracks the ball as an LED
// index (or "no ball") and checks the whole LED pattern and both end flags
// after every clock.  Balls shifted past either end must vanish, not wrap.
module ball_shifter_tb;
  import pingpong_pkg::*;
  localparam int N = 8;
  logic clk = 1'b0, rst;
  ball_cmd_t cmd;
  logic [N-1:0] led;
  logic at_left, at_right;
  int checks = 0, failures = 0, pos, falls = 0;

  ball_shifter #(.N(N)) dut (.clk(clk), .rst(rst), .cmd(cmd), .led(led),
                             .at_left(at_left), .at_right(at_right));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_led;
    int r;
    rst = 1'b1; cmd = BALL_HOLD;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    pos = -1;
    for (int i = 0; i < 5000; i++) begin
      r = $urandom_range(0, 19);
      case (r)
        0:               cmd = BALL_CLEAR;
        1:               cmd = BALL_LOAD_LEFT;
        2:               cmd = BALL_LOAD_RIGHT;
        3,4,5,6,7,8:     cmd = BALL_SHIFT_RIGHT;
        9,10,11,12,13,14: cmd = BALL_SHIFT_LEFT;
        default:         cmd = BALL_HOLD;
      endcase
      @(negedge clk);
      case (cmd)
        BALL_CLEAR:       pos = -1;
        BALL_LOAD_LEFT:   pos = N - 1;
        BALL_LOAD_RIGHT:  pos = 0;
        BALL_SHIFT_RIGHT: if (pos >= 0) begin pos = pos - 1; if (pos < 0) falls++; end
        BALL_SHIFT_LEFT:  if (pos >= 0) begin pos = (pos == N - 1) ? -1 : pos + 1; if (pos < 0) falls++; end
        default: ;
      endcase
      exp_led = '0;
      if (pos >= 0) exp_led[pos] = 1'b1;
      checks++;
      if (led !== exp_led || at_left !== (pos == N - 1) || at_right !== (pos == 0)) begin
        failures++;
        $display("cycle %0d cmd %s: led=%b L=%b R=%b, expected %b", i, cmd.name(), led,
                 at_left, at_right, exp_led);
      end
    end
    checks++;
    if (falls < 10) begin failures++; $display("ball fell off only %0d times", falls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : ball_shifter_tb
