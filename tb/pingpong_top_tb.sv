// pingpong_top_tb: end-to-end test of the whole game at a fast ball speed.
//
// Two complete games are built with TICK_DIV = 16 clocks per ball step and
// FLASH_TICKS = 2: `a` plays by the basic rules, `b` by the optional serving
// rules.  The test plays scripted rallies through the pins only and checks
// the LEDs, both 7-segment patterns (expected digits written as lists of lit
// segment letters) and the binary scores:
//   * a serve lights L7 (or L0) within 5 clocks of the paddle pin rising;
//   * the ball steps exactly TICK_DIV clocks apart and dwells TICK_DIV clocks
//     on the end LED before falling off;
//   * a return at the end LED turns the ball; an early press, or no press,
//     loses the point, and the scorer serves next;
//   * the wrong paddle is ignored while waiting for a serve;
//   * with the single-player wiring (rpb driven by led[0]) R never misses;
//   * at 9 the game stops, presses change nothing, the winner's digit blinks
//     with a half period of FLASH_TICKS * TICK_DIV clocks while the loser's
//     stays lit, and reset starts a new game;
//   * under the serving rules the receiver's miss scores for the server, who
//     serves again, and the server's miss scores nothing and passes the serve.
// Each of these mechanisms is counted and must occur.
module pingpong_top_tb;
  import pingpong_pkg::*;

  localparam int DIV = 16, FT = 2, N = 8;

  logic clk = 1'b0, rst;
  logic lpb_a, rpb_a_drv, rpb_a, lpb_b, rpb_b;
  logic single_player;
  logic [N-1:0] led_a, led_b;
  logic [6:0] sl_a, sr_a, sl_b, sr_b;
  logic [3:0] scl_a, scr_a, scl_b, scr_b;
  int checks = 0, failures = 0;

  typedef enum int { K_SERVE, K_STEP, K_HIT, K_EARLY, K_FALL, K_IGNORED, K_AUTO_RETURN,
                     K_GAME_OVER, K_FLASH, K_FROZEN, K_RESET, K_SERVER_SCORES, K_SERVE_PASSES,
                     K_N } mech_t;
  int mech [K_N];

  // single-player wiring: the right paddle follows the rightmost LED
  assign rpb_a = single_player ? led_a[0] : rpb_a_drv;

  pingpong_top #(.TICK_DIV(DIV), .FLASH_TICKS(FT)) a (
    .clock(clk), .reset(rst), .lpb(lpb_a), .rpb(rpb_a),
    .led(led_a), .sl(sl_a), .sr(sr_a), .score_l(scl_a), .score_r(scr_a));

  pingpong_top #(.TICK_DIV(DIV), .FLASH_TICKS(FT), .SERVE_RULES(1'b1)) b (
    .clock(clk), .reset(rst), .lpb(lpb_b), .rpb(rpb_b),
    .led(led_b), .sl(sl_b), .sr(sr_b), .score_l(scl_b), .score_r(scr_b));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- helpers ----------------
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg"};
  function automatic logic [6:0] seg_of(int d);
    logic [6:0] p = '0;
    for (int k = 0; k < lit[d].len(); k++) p[lit[d][k] - "a"] = 1'b1;
    return p;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%0t FAIL: %s", $time, what); end
  endtask

  task automatic check_scores_a(int l, int r);
    check(scl_a == 4'(l) && scr_a == 4'(r), $sformatf("game a score %0d-%0d, want %0d-%0d", scl_a, scr_a, l, r));
    // a winning 9 may already be blinking (blank)
    check((sl_a == seg_of(l) || (l == 9 && sl_a == 0)) && (sr_a == seg_of(r) || (r == 9 && sr_a == 0)),
          $sformatf("game a displays %b %b", sl_a, sr_a));
  endtask
  task automatic check_scores_b(int l, int r);
    check(scl_b == 4'(l) && scr_b == 4'(r), $sformatf("game b score %0d-%0d, want %0d-%0d", scl_b, scr_b, l, r));
    check(sl_b == seg_of(l) && sr_b == seg_of(r), $sformatf("game b displays %b %b", sl_b, sr_b));
  endtask

  // Hold a button pin high for a few clocks (a human press).
  task automatic push(ref logic btn);
    @(negedge clk) btn = 1'b1;
    repeat (4) @(negedge clk);
    btn = 1'b0;
  endtask

  // Wait until the game-a ball is on LED `pos`; return clocks waited.
  task automatic wait_ball_a(int pos, output int waited);
    waited = 0;
    while (led_a != (N'(1) << pos)) begin
      @(negedge clk); waited++;
      if (waited > 20 * DIV) begin check(0, $sformatf("ball never reached %0d", pos)); return; end
    end
  endtask
  task automatic wait_ball_b(int pos);
    int waited = 0;
    while (led_b != (N'(1) << pos)) begin
      @(negedge clk); waited++;
      if (waited > 20 * DIV) begin check(0, $sformatf("ball b never reached %0d", pos)); return; end
    end
  endtask

  // Serve from the given side of game a and check latency.
  task automatic serve_a(bit left);
    int lat = 0;
    @(negedge clk);
    if (left) lpb_a = 1'b1; else rpb_a_drv = 1'b1;
    while (led_a != (left ? N'(1) << (N - 1) : N'(1))) begin
      @(negedge clk); lat++;
      if (lat > 10) break;
    end
    check(lat <= 5, $sformatf("serve latency %0d clocks", lat));
    repeat (2) @(negedge clk);
    lpb_a = 1'b0; rpb_a_drv = 1'b0;
    mech[K_SERVE]++;
  endtask

  // Follow the game-a ball from one end to the other, checking each step
  // takes exactly DIV clocks.  `towards_right` gives the direction.
  task automatic travel_a(bit towards_right);
    int waited;
    int from = towards_right ? N - 1 : 0;
    for (int k = 1; k < N; k++) begin
      int p = towards_right ? from - k : from + k;
      wait_ball_a(p, waited);
      check(waited == DIV || (k == 1 && waited <= DIV),
            $sformatf("step to LED %0d after %0d clocks, want %0d", p, waited, DIV));
      mech[K_STEP]++;
    end
  endtask

  // Ball is on an end LED: wait `dwell` clocks then push; check hit or not.
  task automatic fall_off_a(int l, int r);
    int gone = 0;
    while (led_a != 0) begin @(negedge clk); gone++; if (gone > 3 * DIV) break; end
    check(gone == DIV, $sformatf("ball fell off after %0d clocks on the end LED, want %0d", gone, DIV));
    @(negedge clk);
    check_scores_a(l, r);
    mech[K_FALL]++;
  endtask

  // ---------------- test ----------------
  initial begin
    int waited;
    for (int k = 0; k < K_N; k++) mech[k] = 0;
    rst = 1'b1; lpb_a = 0; rpb_a_drv = 0; lpb_b = 0; rpb_b = 0; single_player = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    @(negedge clk);
    check(led_a == 0 && led_b == 0, "ball visible after reset");
    check_scores_a(0, 0);
    check_scores_b(0, 0);

    // --- game a, basic rules ---
    // R's paddle is ignored on L's turn
    push(rpb_a_drv);
    repeat (DIV) @(negedge clk);
    check(led_a == 0, "R served on L's turn");
    mech[K_IGNORED]++;

    // L serves, R returns at L0, L misses (no press): R scores, R's turn
    serve_a(1);
    travel_a(1);
    repeat (DIV / 2) @(negedge clk);
    push(rpb_a_drv);
    wait_ball_a(1, waited);
    check(waited <= DIV, "return did not turn the ball");
    mech[K_HIT]++;
    travel_a(0);
    fall_off_a(0, 1);

    // R serves; L presses too early (ball on L4): R scores again
    push(lpb_a);
    repeat (DIV) @(negedge clk);
    check(led_a == 0, "L served on R's turn");
    mech[K_IGNORED]++;
    serve_a(0);
    wait_ball_a(4, waited);
    push(lpb_a);
    repeat (3) @(negedge clk);
    check(led_a == 0, "early press did not end the rally");
    check_scores_a(0, 2);
    mech[K_EARLY]++;

    // R serves; L returns, R presses too early: L scores, L's turn
    serve_a(0);
    wait_ball_a(N - 1, waited);
    push(lpb_a);
    wait_ball_a(N - 2, waited);
    push(rpb_a_drv);
    repeat (3) @(negedge clk);
    check(led_a == 0, "early R press did not end the rally");
    check_scores_a(1, 2);
    mech[K_HIT]++; mech[K_EARLY]++;

    // single-player wiring: R returns by itself; L returns three times, then misses
    single_player = 1'b1;
    serve_a(1);
    for (int v = 0; v < 3; v++) begin
      wait_ball_a(0, waited);
      wait_ball_a(1, waited);           // turned round by the wired paddle
      mech[K_AUTO_RETURN]++;
      wait_ball_a(N - 1, waited);
      repeat (DIV / 2) @(negedge clk);
      push(lpb_a);
      mech[K_HIT]++;
    end
    wait_ball_a(0, waited);
    wait_ball_a(1, waited);
    mech[K_AUTO_RETURN]++;
    wait_ball_a(N - 1, waited);
    fall_off_a(1, 3);
    single_player = 1'b0;

    // R wins by L missing six more serves from R
    for (int pt = 4; pt <= 9; pt++) begin
      serve_a(0);
      travel_a(0);
      fall_off_a(1, pt);
    end

    // game over: R's digit blinks, L's stays; presses do nothing
    repeat (2) @(negedge clk);
    begin
      int flips, since;
      logic on_prev;
      flips = 0; since = 0; on_prev = (sr_a != 0);
      for (int c = 0; c < 8 * FT * DIV; c++) begin
        @(negedge clk);
        since++;
        if (c == 10) begin lpb_a = 1; rpb_a_drv = 1; end
        if (c == 20) begin lpb_a = 0; rpb_a_drv = 0; end
        check(sl_a == seg_of(1), "loser digit changed");
        check(sr_a == seg_of(9) || sr_a == 7'b0, "winner digit neither 9 nor blank");
        check(led_a == 0 && scl_a == 1 && scr_a == 9, "game over not frozen");
        if ((sr_a != 0) != on_prev) begin
          if (flips > 0)
            check(since == FT * DIV, $sformatf("blink half period %0d clocks", since));
          flips++; since = 0; on_prev = (sr_a != 0);
        end
      end
      check(flips >= 6, $sformatf("winner digit blinked %0d times", flips));
      if (flips >= 6) mech[K_FLASH]++;
      mech[K_GAME_OVER]++; mech[K_FROZEN]++;
    end

    // --- game b, serving rules (runs after game a; b has been idle) ---
    // L serves, R misses: L scores and serves again
    push(lpb_b);
    wait_ball_b(0);
    begin
      int c = 0;
      while (led_b != 0 && c < 3 * DIV) begin @(negedge clk); c++; end
    end
    @(negedge clk);
    check_scores_b(1, 0);
    push(rpb_b);
    repeat (DIV) @(negedge clk);
    check(led_b == 0, "receiver served under serving rules");
    // L serves again, R returns, L (the server) misses: no point, R serves next
    push(lpb_b);
    check(led_b == N'(1) << (N - 1) || led_b == N'(1) << (N - 2), "server L did not serve again");
    mech[K_SERVER_SCORES]++;
    wait_ball_b(0);
    push(rpb_b);
    wait_ball_b(N - 1);
    begin
      int c = 0;
      while (led_b != 0 && c < 3 * DIV) begin @(negedge clk); c++; end
    end
    @(negedge clk);
    check_scores_b(1, 0);
    push(lpb_b);
    repeat (DIV) @(negedge clk);
    check(led_b == 0, "L served after losing the serve");
    push(rpb_b);
    repeat (3) @(negedge clk);
    check(led_b == N'(1) || led_b == N'(2), "R did not take the serve");
    mech[K_SERVE_PASSES]++;

    // reset starts a new game
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    @(negedge clk);
    check_scores_a(0, 0);
    check_scores_b(0, 0);
    check(led_a == 0 && led_b == 0, "ball after reset");
    serve_a(1);
    mech[K_RESET]++;

    for (int k = 0; k < K_N; k++) begin
      $display("mechanism %s: %0d", mech_t'(k), mech[k]);
      check(mech[k] > 0, $sformatf("mechanism %s never happened", mech_t'(k)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : pingpong_top_tb
