// Interval timer: the 4-bit counter D C B A and its decoding into T.
//
// The counter advances by one on every count enable (one count per
// 2 seconds) and wraps from 15 to 0 by itself, so one turn is 32 s. T is the
// function of the count given by the timing truth table:
//   count 0-2  T=0  (6 s  amber hand-over)
//   count 3    T=1  (2 s  red)
//   count 4-6  T=0  (6 s  red+amber)
//   count 7-15 T=1  (18 s green)
// which reduces to T = D | (B & A).
//
// Interface and timing: synchronous, rising edge of clk. rst is the
// power-up pulse and clr is HCLRT; both are synchronous, active high, and
// take priority over a count. T is combinational from the count register.
// The count sequence and T decoding are the design's; the synchronous
// clear is this implementation's choice.
module interval_timer
  import traffic_pkg::*;
(
  input  logic               clk,
  input  logic               rst,    // power-up one-shot pulse
  input  logic               clr,    // HCLRT
  input  logic               tick,   // one count per 2 s
  output logic [COUNT_W-1:0] count,  // D C B A
  output logic               t       // timing qualifier T
);

  always_ff @(posedge clk) begin
    if (rst || clr)  count <= '0;
    else if (tick)   count <= count + 1'b1;
  end

  assign t = count[3] | (count[1] & count[0]);

endmodule
