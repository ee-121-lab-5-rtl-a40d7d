// tick_gen: divides the board clock into the ball-step tick and the slow
// square wave used to flash the winner's score.
//
// A modulo-DIV counter raises `tick` for one clock every DIV clocks; the ball
// moves one LED per tick, so DIV sets the ball speed (the default, 25 MHz / 8,
// gives eight steps per second, a speed of this design's choosing).
// `restart` zeroes the counter so that a serve always gives the ball a full
// tick period on its first LED.  A second counter counts ticks and toggles
// `flash` every FLASH_TICKS ticks (default 2: a 2 Hz blink at the default
// speed); it is not disturbed by `restart`.
//
// Interface: clk, rst (synchronous, active high), restart -> tick (1-cycle
// pulse), flash (level).  Timing: after rst or restart, the first tick comes
// DIV clocks later, then every DIV clocks.
module tick_gen #(
  parameter int unsigned DIV         = pingpong_pkg::CLK_HZ_DEFAULT / 8,
  parameter int unsigned FLASH_TICKS = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic restart,
  output logic tick,
  output logic flash
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  localparam int unsigned FW = (FLASH_TICKS > 1) ? $clog2(FLASH_TICKS) : 1;

  logic [CW-1:0] count;
  logic [FW-1:0] fcount;

  assign tick = (count == CW'(DIV - 1));

  always_ff @(posedge clk) begin
    if (rst || restart || tick) count <= '0;
    else                        count <= count + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fcount <= '0;
      flash  <= 1'b1;
    end else if (tick) begin
      if (fcount == FW'(FLASH_TICKS - 1)) begin
        fcount <= '0;
        flash  <= ~flash;
      end else begin
        fcount <= fcount + 1'b1;
      end
    end
  end

endmodule : tick_gen
