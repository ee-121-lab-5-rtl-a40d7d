// score_counter_tb: self-checking test of the saturating score counter.
//
// Random increments drive the counter from reset; the testbench keeps the
// score as min(increments, 9) and checks count and at_max each clock,
// including many increments after the limit is reached and a mid-run reset.
module score_counter_tb;
  logic clk = 1'b0, rst, inc, at_max;
  logic [3:0] count;
  int checks = 0, failures = 0, ref_score, sat_hits = 0;

  score_counter #(.WIDTH(4), .MAX(9)) dut (.clk(clk), .rst(rst), .inc(inc),
                                          .count(count), .at_max(at_max));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; inc = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    ref_score = 0;
    for (int i = 0; i < 2000; i++) begin
      rst = (i % 500 == 499);
      inc = ($urandom_range(0, 2) == 0);
      @(negedge clk);
      if (rst) ref_score = 0;
      else if (inc) begin
        if (ref_score == 9) sat_hits++;
        ref_score = (ref_score < 9) ? ref_score + 1 : 9;
      end
      checks++;
      if (count !== 4'(ref_score) || at_max !== (ref_score == 9)) begin
        failures++;
        $display("cycle %0d: count=%0d at_max=%b, expected %0d", i, count, at_max, ref_score);
      end
    end
    checks++;
    if (sat_hits < 10) begin failures++; $display("saturation rarely exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : score_counter_tb
