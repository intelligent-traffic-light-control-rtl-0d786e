// Time base: one count-enable pulse every COUNT_PERIOD_S seconds.
//
// A free-running modulo-TICK_CYCLES counter divides the system clock; tick
// is high for exactly one clock cycle at the end of each period. clr
// restarts the period from zero (used with HCLRT so that a phase started
// early still gets whole 2-second counts).
//
// Interface and timing: synchronous, rising edge of clk; rst and clr are
// synchronous and active high; the first tick after rst or clr comes
// TICK_CYCLES cycles after the edge that took them. The 2-second count
// period is the design's; the clock frequency (a 32.768 kHz crystal) and
// the clear input are this implementation's own choices.
module timebase #(
  parameter int unsigned CLK_HZ         = 32768,  // system clock frequency
  parameter int unsigned COUNT_PERIOD_S = 2       // seconds per count
) (
  input  logic clk,
  input  logic rst,
  input  logic clr,
  output logic tick
);

  localparam int unsigned TICK_CYCLES = CLK_HZ * COUNT_PERIOD_S;
  localparam int unsigned DIV_W       = (TICK_CYCLES > 1) ? $clog2(TICK_CYCLES) : 1;

  logic [DIV_W-1:0] div;
  logic             last;

  assign last = (div == DIV_W'(TICK_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (rst || clr)  div <= '0;
    else if (last)   div <= '0;
    else             div <= div + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst || clr) tick <= 1'b0;
    else            tick <= last;
  end

  initial assert (TICK_CYCLES >= 2) else $error("timebase needs at least 2 cycles per count");

endmodule
