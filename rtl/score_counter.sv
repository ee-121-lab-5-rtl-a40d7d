// score_counter: one player's score, a 4-bit up counter limited to MAX.
//
// Each `inc` pulse adds one point until the count reaches MAX (9, the winning
// score), after which further increments are ignored, so the display never
// shows more than one decimal digit.  `at_max` tells the game controller this
// player has won.  Saturation at 9 follows the game's scoring rule; the
// synchronous clear is the master reset.
//
// Interface: clk, rst (synchronous, active high), inc -> count[WIDTH-1:0],
// at_max.  Timing: count and at_max change at the clock edge after inc.
module score_counter #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned MAX   = 9
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             inc,
  output logic [WIDTH-1:0] count,
  output logic             at_max
);

  assign at_max = (count == WIDTH'(MAX));

  always_ff @(posedge clk) begin
    if (rst)                  count <= '0;
    else if (inc && !at_max)  count <= count + 1'b1;
  end

endmodule : score_counter
