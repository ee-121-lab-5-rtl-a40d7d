// seg7_decoder: turns one score digit into the seven segment drives of a
// single 7-segment display.
//
// seg[0] drives segment a (top), then b (upper right), c (lower right),
// d (bottom), e (lower left), f (upper left) and seg[6] segment g (middle).
// Digits 0-9 and A-F are decoded; the game's score stays within 0-9.
// `blank` turns every segment off; the top drives it with the flash wave to
// make the winner's score blink.  Segments are active high by default;
// ACTIVE_LOW=1 inverts them for a common-anode display.  Segment order,
// polarity and hex digits are this design's choices.
//
// Interface: digit[3:0], blank -> seg[6:0].  Purely combinational.
module seg7_decoder #(
  parameter bit ACTIVE_LOW = 1'b0
) (
  input  logic [3:0] digit,
  input  logic       blank,
  output logic [6:0] seg
);

  logic [6:0] on;  // segments lit, g..a

  always_comb begin
    unique case (digit)
      4'h0: on = 7'b011_1111;
      4'h1: on = 7'b000_0110;
      4'h2: on = 7'b101_1011;
      4'h3: on = 7'b100_1111;
      4'h4: on = 7'b110_0110;
      4'h5: on = 7'b110_1101;
      4'h6: on = 7'b111_1101;
      4'h7: on = 7'b000_0111;
      4'h8: on = 7'b111_1111;
      4'h9: on = 7'b110_1111;
      4'hA: on = 7'b111_0111;
      4'hB: on = 7'b111_1100;
      4'hC: on = 7'b011_1001;
      4'hD: on = 7'b101_1110;
      4'hE: on = 7'b111_1001;
      4'hF: on = 7'b111_0001;
      default: on = 7'b000_0000;
    endcase
    if (blank) on = 7'b000_0000;
    seg = ACTIVE_LOW ? ~on : on;
  end

endmodule : seg7_decoder
