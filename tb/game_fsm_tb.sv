// game_fsm_tb: self-checking test of the core game state machine, under the
// basic rules and under the optional serving rules at once.
//
// Two controllers (SERVE_RULES = 0 and 1) each get a stand-in for the ball
// register and score counters that follows the controller's own commands,
// and a reference model of the game written as events: serve, hit, early
// press, ball falling off, point, change of turn, game over.  Paddle presses
// are random but made likely while the ball sits on the receiver's end LED,
// so rallies of several hits happen.  Every clock the point pulses, tick
// restart and game-over flag are compared with the model, and after every
// clock the ball position and both scores.  When a game ends the test holds
// it for a while (presses must change nothing), then resets and plays again.
// Each mechanism (serve, hit, early press, fall-off, server miss with no
// point, game over) must occur at least once for each rule set.
module game_fsm_tb;
  import pingpong_pkg::*;

  localparam int N = 8, WIN = 9;

  typedef enum int { M_SERVE, M_MOVE, M_OVER } mphase_t;
  typedef struct {
    mphase_t phase;
    player_t turn;       // whose serve (M_SERVE)
    player_t receiver;   // who must hit next (M_MOVE)
    player_t server;
    int      pos;        // LED index of the ball, N-1 = L7, -1 = no ball
    int      sl, sr;
  } model_t;

  typedef enum int { EV_SERVE, EV_HIT, EV_EARLY, EV_FALL, EV_NOPOINT, EV_OVER, EV_N } ev_t;

  logic clk = 1'b0, rst;
  logic lpb, rpb, tick;
  int   checks = 0, failures = 0;
  int   events [2][EV_N];

  // ---- two controllers with their stand-ins ----
  ball_cmd_t   cmd [2];
  logic        inc_l [2], inc_r [2], trs [2], over [2];
  game_state_t st [2];
  player_t     win [2];
  int          s_pos [2], s_sl [2], s_sr [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    game_fsm #(.SERVE_RULES(g[0])) dut (
      .clk(clk), .rst(rst), .lpb_press(lpb), .rpb_press(rpb), .tick(tick),
      .at_left(s_pos[g] == N - 1), .at_right(s_pos[g] == 0),
      .won_l(s_sl[g] == WIN), .won_r(s_sr[g] == WIN),
      .ball_cmd(cmd[g]), .inc_l(inc_l[g]), .inc_r(inc_r[g]), .tick_restart(trs[g]),
      .state(st[g]), .winner(win[g]), .game_over(over[g]));

    // stand-in for ball register and score counters
    always_ff @(posedge clk) begin
      if (rst) begin
        s_pos[g] <= -1; s_sl[g] <= 0; s_sr[g] <= 0;
      end else begin
        case (cmd[g])
          BALL_CLEAR:       s_pos[g] <= -1;
          BALL_LOAD_LEFT:   s_pos[g] <= N - 1;
          BALL_LOAD_RIGHT:  s_pos[g] <= 0;
          BALL_SHIFT_RIGHT: s_pos[g] <= (s_pos[g] >= 0) ? s_pos[g] - 1 : -1;
          BALL_SHIFT_LEFT:  s_pos[g] <= (s_pos[g] >= 0 && s_pos[g] < N - 1) ? s_pos[g] + 1 : -1;
          default: ;
        endcase
        if (inc_l[g] && s_sl[g] < WIN) s_sl[g] <= s_sl[g] + 1;
        if (inc_r[g] && s_sr[g] < WIN) s_sr[g] <= s_sr[g] + 1;
      end
    end
  end

  // ---- reference model ----
  function automatic int end_of(player_t p);
    return (p == PLAYER_L) ? N - 1 : 0;
  endfunction
  function automatic player_t other(player_t p);
    return (p == PLAYER_L) ? PLAYER_R : PLAYER_L;
  endfunction

  function automatic void point(inout model_t m, input player_t p);
    if (p == PLAYER_L) m.sl = (m.sl < WIN) ? m.sl + 1 : WIN;
    else               m.sr = (m.sr < WIN) ? m.sr + 1 : WIN;
  endfunction

  // One clock of the game.  Returns the expected point pulses and restart.
  function automatic void step(inout model_t m, input bit serve_rules,
                               input logic lp, rp, tk,
                               output logic e_il, e_ir, e_trs, output bit ev [EV_N]);
    logic press_of [2];
    player_t loser;
    bit lost = 0;
    int sl0 = m.sl, sr0 = m.sr;
    for (int e = 0; e < EV_N; e++) ev[e] = 0;
    press_of[PLAYER_L] = lp;
    press_of[PLAYER_R] = rp;
    e_trs = 1'b0;
    case (m.phase)
      M_SERVE:
        if (m.sl == WIN || m.sr == WIN) begin
          m.phase = M_OVER; ev[EV_OVER] = 1;
        end else if (press_of[m.turn]) begin
          m.pos = end_of(m.turn); m.server = m.turn; m.receiver = other(m.turn);
          m.phase = M_MOVE; e_trs = 1'b1; ev[EV_SERVE] = 1;
        end
      M_MOVE: begin
        player_t r = m.receiver;
        if (press_of[r]) begin
          if (m.pos == end_of(r)) begin m.receiver = other(r); ev[EV_HIT] = 1; end
          else begin lost = 1; loser = r; ev[EV_EARLY] = 1; end
        end else if (tk) begin
          if (m.pos == end_of(r)) begin lost = 1; loser = r; ev[EV_FALL] = 1; end
          else m.pos = (r == PLAYER_R) ? m.pos - 1 : m.pos + 1;
        end
      end
      default: ;
    endcase
    if (lost) begin
      m.pos = -1; m.phase = M_SERVE;
      if (!serve_rules) begin
        point(m, other(loser)); m.turn = other(loser);
      end else if (loser != m.server) begin
        point(m, m.server); m.turn = m.server;
      end else begin
        m.turn = other(m.server); ev[EV_NOPOINT] = 1;
      end
    end
    e_il = (m.sl != sl0);
    e_ir = (m.sr != sr0);
  endfunction

  function automatic model_t fresh();
    model_t m;
    m.phase = M_SERVE; m.turn = PLAYER_L; m.receiver = PLAYER_R; m.server = PLAYER_L;
    m.pos = -1; m.sl = 0; m.sr = 0;
    return m;
  endfunction

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Press probability for one paddle given the ball as seen by one model.
  function automatic logic want_press(model_t m, player_t p);
    if (m.phase == M_MOVE && m.receiver == p && m.pos == end_of(p))
      return $urandom_range(0, 3) != 0;          // usually hit
    if (m.phase == M_SERVE && m.turn == p)
      return $urandom_range(0, 4) == 0;
    return $urandom_range(0, 150) == 0;          // stray press
  endfunction

  initial begin
    model_t m [2], nxt [2];
    logic e_il, e_ir, e_trs;
    bit ev [EV_N];
    int games, over_hold;
    games = 0; over_hold = 0;
    for (int g = 0; g < 2; g++) for (int e = 0; e < EV_N; e++) events[g][e] = 0;
    rst = 1'b1; lpb = 1'b0; rpb = 1'b0; tick = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    m[0] = fresh(); m[1] = fresh();
    for (int i = 0; i < 200000 && games < 12; i++) begin
      // Stimulus follows the two models alternately so both see good play.
      lpb  = want_press(m[i % 2], PLAYER_L);
      rpb  = want_press(m[i % 2], PLAYER_R);
      tick = ($urandom_range(0, 5) == 0);
      #1;
      for (int g = 0; g < 2; g++) begin
        nxt[g] = m[g];
        step(nxt[g], g[0], lpb, rpb, tick, e_il, e_ir, e_trs, ev);
        for (int e = 0; e < EV_N; e++) if (ev[e]) events[g][e]++;
        checks++;
        if (inc_l[g] !== e_il || inc_r[g] !== e_ir || trs[g] !== e_trs ||
            over[g] !== (m[g].phase == M_OVER)) begin
          failures++;
          $display("rules %0d cycle %0d: inc %b%b trs %b over %b, expected %b%b %b %b",
                   g, i, inc_l[g], inc_r[g], trs[g], over[g], e_il, e_ir, e_trs,
                   m[g].phase == M_OVER);
        end
        if (m[g].phase == M_OVER) begin
          checks++;
          if (win[g] !== ((m[g].sr == WIN) ? PLAYER_R : PLAYER_L)) begin
            failures++; $display("rules %0d: wrong winner", g);
          end
        end
      end
      @(negedge clk);
      for (int g = 0; g < 2; g++) begin
        m[g] = nxt[g];
        checks++;
        if (s_pos[g] != m[g].pos || s_sl[g] != m[g].sl || s_sr[g] != m[g].sr) begin
          failures++;
          $display("rules %0d cycle %0d: ball %0d score %0d-%0d, expected %0d %0d-%0d", g, i,
                   s_pos[g], s_sl[g], s_sr[g], m[g].pos, m[g].sl, m[g].sr);
        end
      end
      // Once both games are over, hold a while, then start a new game.
      if (m[0].phase == M_OVER && m[1].phase == M_OVER) begin
        if (++over_hold == 50) begin
          over_hold = 0; games++;
          rst = 1'b1;
          @(negedge clk) rst = 1'b0;
          m[0] = fresh(); m[1] = fresh();
        end
      end
    end
    for (int g = 0; g < 2; g++) begin
      $display("rules %0d: serves %0d hits %0d early %0d falls %0d no-point misses %0d games over %0d",
               g, events[g][EV_SERVE], events[g][EV_HIT], events[g][EV_EARLY], events[g][EV_FALL],
               events[g][EV_NOPOINT], events[g][EV_OVER]);
      for (int e = 0; e < EV_N; e++) begin
        if (g == 0 && e == EV_NOPOINT) continue;   // basic rules always award a point
        checks++;
        if (events[g][e] == 0) begin failures++; $display("rules %0d: event %0d never happened", g, e); end
      end
      checks++;
      if (g == 0 && events[0][EV_NOPOINT] != 0) begin failures++; $display("no-point miss under basic rules"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : game_fsm_tb
