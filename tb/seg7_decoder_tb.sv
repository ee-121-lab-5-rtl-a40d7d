// seg7_decoder_tb: self-checking test of the 7-segment decoder.
//
// Each digit's expected pattern is written as the list of lit segment
// letters (for example "bc" for 1) and converted to bits in the testbench.
// All sixteen digits are checked with blank off and on, for both the active
// high decoder and an active low one.
module seg7_decoder_tb;
  logic [3:0] digit;
  logic       blank;
  logic [6:0] seg_h, seg_l;
  int checks = 0, failures = 0;

  seg7_decoder #(.ACTIVE_LOW(1'b0)) dut_h (.digit(digit), .blank(blank), .seg(seg_h));
  seg7_decoder #(.ACTIVE_LOW(1'b1)) dut_l (.digit(digit), .blank(blank), .seg(seg_l));

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] pattern(string s);
    logic [6:0] p = '0;
    for (int k = 0; k < s.len(); k++) p[s[k] - "a"] = 1'b1;
    return p;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] exp;
    for (int b = 0; b < 2; b++) begin
      for (int d = 0; d < 16; d++) begin
        digit = 4'(d); blank = b[0];
        #1;
        exp = blank ? 7'b0 : pattern(lit[d]);
        checks++;
        if (seg_h !== exp || seg_l !== ~exp) begin
          failures++;
          $display("digit %0d blank %0d: seg=%b/%b expected %b", d, b, seg_h, seg_l, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : seg7_decoder_tb
