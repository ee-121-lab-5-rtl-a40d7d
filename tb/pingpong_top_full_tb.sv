// pingpong_top_full_tb: one complete rally of the game at its default
// parameters: 25 MHz clock and 3,125,000 clocks per ball step (eight LED
// steps per second).
//
// L serves; the ball crosses all eight LEDs; R returns it on L0; it crosses
// back and L does not press, so it falls off L7 and R scores.  The test
// checks each LED in turn, that every step takes exactly 3,125,000 clocks
// (0.125 s of play), that the ball rests one full step on the end LED
// before falling off, and that R's display then shows 1 and L's shows 0.
module pingpong_top_full_tb;
  localparam int STEP = 25_000_000 / 8;

  logic clk = 1'b0, rst, lpb, rpb;
  logic [7:0] led;
  logic [6:0] sl, sr;
  logic [3:0] score_l, score_r;
  longint cyc = 0;
  int checks = 0, failures = 0;

  pingpong_top dut (.clock(clk), .reset(rst), .lpb(lpb), .rpb(rpb), .led(led),
                    .sl(sl), .sr(sr), .score_l(score_l), .score_r(score_r));

  always #20 clk = ~clk;      // 25 MHz
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #(64'd40 * 64'd60_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL at clock %0d: %s", cyc, what); end
  endtask

  initial begin
    longint t_prev;
    rst = 1'b1; lpb = 1'b0; rpb = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    @(negedge clk);
    check(led == 0 && score_l == 0 && score_r == 0, "state after reset");

    lpb = 1'b1;
    @(led);
    check(led == 8'b1000_0000, "serve lit L7");
    t_prev = cyc;
    repeat (10) @(negedge clk);
    lpb = 1'b0;
    for (int p = 6; p >= 0; p--) begin
      @(led);
      check(led == 8'(1) << p, $sformatf("ball on %b, want LED %0d", led, p));
      check(cyc - t_prev == STEP, $sformatf("step took %0d clocks", cyc - t_prev));
      t_prev = cyc;
    end
    // return halfway through the dwell on L0
    repeat (STEP / 2) @(posedge clk);
    @(negedge clk) rpb = 1'b1;
    repeat (10) @(negedge clk);
    rpb = 1'b0;
    for (int p = 1; p <= 7; p++) begin
      @(led);
      check(led == 8'(1) << p, $sformatf("ball on %b, want LED %0d", led, p));
      check(cyc - t_prev == STEP, $sformatf("step took %0d clocks", cyc - t_prev));
      t_prev = cyc;
    end
    @(led);
    check(led == 0, "ball did not fall off L7");
    check(cyc - t_prev == STEP, $sformatf("dwell before falling off %0d clocks", cyc - t_prev));
    @(negedge clk);
    check(score_l == 0 && score_r == 1, $sformatf("score %0d-%0d, want 0-1", score_l, score_r));
    check(sl == 7'b011_1111 && sr == 7'b000_0110, "displays do not show 0 and 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : pingpong_top_full_tb
