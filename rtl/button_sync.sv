// button_sync: brings one paddle pushbutton into the clock domain and reports
// each press as a single-cycle pulse.
//
// The raw button level passes through a two-flop synchroniser; a third flop
// holds the previous synchronised level, and `press` is high for exactly one
// clock in the cycle the synchronised level rises.  Holding the button down
// therefore counts as one press, so a player cannot keep a paddle held to
// catch the ball.  Everything is clocked by the one board clock, so the game
// stays fully synchronous with no gated clocks.  Contact debouncing is not
// done here: bounces shorter than one clock period are filtered by the
// synchroniser only.  That, the edge detection and the active-high button
// polarity are this design's choices.
//
// Interface: clk, rst (synchronous, active high), btn (asynchronous raw
// level, active high) -> press (1-cycle pulse).
// Timing: press rises 3 clock edges after btn rises (2 sync + 1 edge flop).
module button_sync (
  input  logic clk,
  input  logic rst,
  input  logic btn,
  output logic press
);

  logic meta, sync, prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= 1'b0;
      sync <= 1'b0;
      prev <= 1'b0;
    end else begin
      meta <= btn;
      sync <= meta;
      prev <= sync;
    end
  end

  assign press = sync & ~prev;

endmodule : button_sync
