// STT controller: the state machine of the T-junction traffic light.
//
// The next-state logic is the state transition table (STT) of the design,
// written as one case item per present state and one assignment per link
// path (27 link paths in all). Its inputs are the present state code D C B A,
// the timing qualifier T from interval_timer and the three queue detector
// qualifiers QN, QE, QLE (1 = no queue). Its outputs are the next state code
// D'C'B'A' and the conditional output HCLRT, together the 5-bit word that the
// STT program writes to its output port (next state in bits 4:1, HCLRT in
// bit 0, e.g. 09h = go to ST4 and clear the timer).
//
// Sequence per approach (N in ST2/ST3, E in ST6/ST7, LE in ST10/ST11):
// amber hand-over while T=0, all red while T=1, red+amber while T=0, green
// while T=1 and the approach still has a queue. The green state is left with
// HCLRT=1 either when T falls (the counter wrapped after 18 s) or as soon as
// the approach's detector reports no queue.
//
// Interface and timing: state is a register updated on the rising edge of
// clk; rst (synchronous, active high, the power-up pulse) forces ST0.
// hclrt is a Mealy output, valid in the same cycle as the transition it
// belongs to, so that interval_timer clears on the very edge on which the
// state leaves the green state. The registered word of the output port is
// available as port_word.
//
// Taken from the design: the twelve states, their binary codes and all 27
// link paths with their HCLRT values. Own choices: the clocked hardware form
// of the program loop, HCLRT as a combinational strobe, and the recovery
// from the unused codes 12..15 (go to ST0 with HCLRT=1).
module stt_controller
  import traffic_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 t,          // timing qualifier T
  input  queues_t              q,          // queue qualifiers, 1 = no queue
  output state_e               state,      // present state D C B A
  output logic                 hclrt,      // conditional output HCLRT
  output logic [STATE_W:0]     port_word   // last output port word {D'C'B'A', HCLRT}
);

  state_e next_state;  // D'C'B'A'

  always_comb begin
    next_state = state;
    hclrt      = 1'b0;
    unique case (state)
      ST0:  if (!t) next_state = ST0;                              // L1
            else    next_state = ST1;                              // L2
      ST1:  if (t)  next_state = ST1;                              // L3
            else    next_state = ST2;                              // L4
      ST2:  if (!t) next_state = ST2;                              // L5
            else    next_state = ST3;                              // L6
      ST3:  if (t && !q.qn)       next_state = ST3;                // L7
            else if (!t && !q.qn) {next_state, hclrt} = {ST4, 1'b1}; // L8
            else                  {next_state, hclrt} = {ST4, 1'b1}; // L9 (QN=1)
      ST4:  if (!t) next_state = ST4;                              // L10
            else    next_state = ST5;                              // L11
      ST5:  if (t)  next_state = ST5;                              // L12
            else    next_state = ST6;                              // L13
      ST6:  if (!t) next_state = ST6;                              // L14
            else    next_state = ST7;                              // L15
      ST7:  if (t && !q.qe)       next_state = ST7;                // L16
            else if (!t && !q.qe) {next_state, hclrt} = {ST8, 1'b1}; // L17
            else                  {next_state, hclrt} = {ST8, 1'b1}; // L18 (QE=1)
      ST8:  if (!t) next_state = ST8;                              // L19
            else    next_state = ST9;                              // L20
      ST9:  if (t)  next_state = ST9;                              // L21
            else    next_state = ST10;                             // L22
      ST10: if (!t) next_state = ST10;                             // L23
            else    next_state = ST11;                             // L24
      ST11: if (t && !q.qle)       next_state = ST11;              // L25
            else if (!t && !q.qle) {next_state, hclrt} = {ST0, 1'b1}; // L26
            else                   {next_state, hclrt} = {ST0, 1'b1}; // L27 (QLE=1)
      default: {next_state, hclrt} = {ST0, 1'b1};                  // unused codes
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= ST0;
      port_word <= '0;
    end else begin
      state     <= next_state;
      port_word <= {next_state, hclrt};
    end
  end

  // HCLRT is only ever issued when a green state is left.
  a_hclrt_only_from_green: assert property (@(posedge clk) disable iff (rst)
    hclrt |-> (state inside {ST3, ST7, ST11}) && (next_state != state));

  // A reset controller never reaches the unused codes.
  a_state_legal: assert property (@(posedge clk) disable iff (rst)
    32'(state) < NUM_STATES);

endmodule
