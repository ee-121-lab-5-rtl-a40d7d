// button_sync_tb: self-checking test of the paddle synchroniser.
//
// A random button waveform (long presses, short glitches, holds) drives the
// block; a reference three-stage delay line kept in the testbench predicts the
// press pulse, which must appear exactly 3 clocks after the button rises and
// last one clock.  Holding the button must give one pulse only.
module button_sync_tb;
  logic clk = 1'b0, rst, btn, press;
  int   checks = 0, failures = 0, pulses = 0;
  logic [2:0] ref_pipe;  // btn delayed by 1, 2, 3 clocks

  button_sync dut (.clk(clk), .rst(rst), .btn(btn), .press(press));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hold;
    rst = 1'b1; btn = 1'b0; ref_pipe = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // expected output for this cycle: level two clocks old high, three clocks old low
      checks++;
      if (press !== (ref_pipe[1] & ~ref_pipe[2])) begin
        failures++;
        $display("cycle %0d: press=%b expected %b", i, press, ref_pipe[1] & ~ref_pipe[2]);
      end
      if (press) pulses++;
      if (hold > 0) hold--;
      else begin
        btn  = ~btn;
        hold = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 40);
      end
      @(posedge clk);
      ref_pipe = {ref_pipe[1:0], btn};
    end
    // one long hold gives one pulse
    @(negedge clk) btn = 1'b0;
    repeat (5) @(negedge clk);
    pulses = 0;
    btn = 1'b1;
    repeat (50) begin @(negedge clk); if (press) pulses++; end
    checks++;
    if (pulses != 1) begin failures++; $display("held button gave %0d pulses", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : button_sync_tb
