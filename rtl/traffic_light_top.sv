// T-junction traffic light controller with queue detection.
//
// Three approaches (N, E, LE) get right of way in turn. For each one the
// controller shows 6 s amber to the approach handing over, 2 s all red,
// 6 s red+amber to the approach receiving, then up to 18 s green. The green
// ends early, and the next approach is served, as soon as the queue
// detector of the green approach reports that no vehicles are waiting.
//
// Structure, following the processor-plus-ROM arrangement of the design
// with the program turned into logic:
//   timebase          one count enable every 2 s
//   interval_timer    4-bit counter D C B A and its decoding into T
//   stt_controller    the state transition table: present state, next
//                     state and the conditional output HCLRT
//   state_output_rom  present state code to the 11 lamp lines
// HCLRT restarts the counter (and the 2-second period) on the edge on
// which the controller leaves a green state, so every phase starts at
// count 0. The queue lines pass through a two-flop synchroniser.
//
// Interface and timing: one clock, clk (32.768 kHz by default; CLK_HZ sets
// it). rst is the power-up pulse, synchronous and active high; after it the
// controller is in ST0 (LE amber) with the counter at 0. qn, qe, qle are
// 1 when the detector of that approach sees no queue. lamps drive the
// solid-state switches, 1 = lamp on. state, count, t and hclrt are brought
// out for monitoring, with port_word, the registered
// {next state, HCLRT} word of the controller's output port. The lamps
// follow the state register combinationally, through the ROM.
module traffic_light_top
  import traffic_pkg::*;
#(
  parameter int unsigned CLK_HZ         = 32768,
  parameter int unsigned COUNT_PERIOD_S = 2
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               qn,     // N approach: 1 = no queue
  input  logic               qe,     // E approach: 1 = no queue
  input  logic               qle,    // LE approach: 1 = no queue
  output lamps_t             lamps,
  output state_e             state,
  output logic [COUNT_W-1:0] count,
  output logic               t,
  output logic               hclrt,
  output logic [STATE_W:0]   port_word  // registered {next state, HCLRT}
);

  queues_t            q_sync;
  logic               tick;

  sync2 #(.WIDTH(3), .RESET_VAL(3'b000)) u_qsync (
    .clk (clk),
    .rst (rst),
    .d   ({qn, qe, qle}),
    .q   (q_sync)
  );

  timebase #(.CLK_HZ(CLK_HZ), .COUNT_PERIOD_S(COUNT_PERIOD_S)) u_timebase (
    .clk  (clk),
    .rst  (rst),
    .clr  (hclrt),
    .tick (tick)
  );

  interval_timer u_timer (
    .clk   (clk),
    .rst   (rst),
    .clr   (hclrt),
    .tick  (tick),
    .count (count),
    .t     (t)
  );

  stt_controller u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .t          (t),
    .q          (q_sync),
    .state      (state),
    .hclrt      (hclrt),
    .port_word  (port_word)
  );

  state_output_rom u_rom (
    .addr  (state),
    .lamps (lamps)
  );

endmodule
