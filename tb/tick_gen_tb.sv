// tick_gen_tb: self-checking test of the ball-step divider and flash wave.
//
// With DIV=7 and FLASH_TICKS=3 a reference count of clocks since the last
// tick or restart predicts `tick` every cycle: exactly DIV clocks apart, and
// DIV clocks after a restart.  A reference count of ticks predicts `flash`,
// which must start high and toggle on every third tick.  Random restarts are
// applied throughout.
module tick_gen_tb;
  localparam int DIV = 7, FT = 3;
  logic clk = 1'b0, rst, restart, tick, flash;
  int   checks = 0, failures = 0;
  int   ref_cnt, ref_ticks, nticks, nrestarts, nflips;
  logic ref_flash;

  tick_gen #(.DIV(DIV), .FLASH_TICKS(FT)) dut (
    .clk(clk), .rst(rst), .restart(restart), .tick(tick), .flash(flash));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_tick;
    rst = 1'b1; restart = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    ref_cnt = 0; ref_ticks = 0; ref_flash = 1'b1;
    nticks = 0; nrestarts = 0; nflips = 0;
    for (int i = 0; i < 5000; i++) begin
      restart  = ($urandom_range(0, 40) == 0);
      exp_tick = (ref_cnt == DIV - 1);
      #1;
      checks++;
      if (tick !== exp_tick || flash !== ref_flash) begin
        failures++;
        $display("cycle %0d: tick=%b flash=%b, expected %b %b", i, tick, flash, exp_tick, ref_flash);
      end
      if (tick) nticks++;
      if (restart) nrestarts++;
      @(negedge clk);
      // reference update for the edge just passed
      if (exp_tick) begin
        if (ref_ticks == FT - 1) begin ref_ticks = 0; ref_flash = ~ref_flash; nflips++; end
        else ref_ticks++;
      end
      ref_cnt = (restart || exp_tick) ? 0 : ref_cnt + 1;
    end
    checks++;
    if (nticks < 100 || nrestarts < 20 || nflips < 20) begin
      failures++; $display("too few ticks/restarts/flips: %0d %0d %0d", nticks, nrestarts, nflips);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tick_gen_tb
