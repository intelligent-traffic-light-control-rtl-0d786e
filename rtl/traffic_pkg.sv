// Shared types and constants of the T-junction traffic light controller.
//
// The junction has three approaches, called N, E and LE, each with a red,
// amber and green lamp, plus two auxiliary lamps HR1 and HR2. The controller
// walks twelve states, ST0..ST11, four per approach: amber hand-over from the
// previous approach, all red, red+amber for the next approach, green for it.
// State codes are the plain binary numbers 0..11, as in the state assignment
// of the design; codes 12..15 are unused.
//
// The lamp bundle is a packed struct whose field order is the order in which
// the design lists its lamp lines (HAMBLE first, HGRNLE last), so the ROM word
// of state_output_rom reads in that same order, MSB first.
package traffic_pkg;

  // Width of the state code D C B A and of the interval counter.
  localparam int unsigned STATE_W = 4;
  localparam int unsigned COUNT_W = 4;
  localparam int unsigned NUM_STATES = 12;
  localparam int unsigned NUM_LAMPS = 11;

  typedef enum logic [STATE_W-1:0] {
    ST0  = 4'd0,   // LE amber (LE hands over)
    ST1  = 4'd1,   // all red
    ST2  = 4'd2,   // N red+amber (N about to receive)
    ST3  = 4'd3,   // N green
    ST4  = 4'd4,   // N amber
    ST5  = 4'd5,   // all red
    ST6  = 4'd6,   // E red+amber
    ST7  = 4'd7,   // E green
    ST8  = 4'd8,   // E amber
    ST9  = 4'd9,   // all red
    ST10 = 4'd10,  // LE red+amber
    ST11 = 4'd11   // LE green
  } state_e;

  // One bit per lamp control line; 1 switches the lamp on.
  typedef struct packed {
    logic hamble;  // LE amber
    logic hredn;   // N red
    logic hrede;   // E red
    logic hredle;  // LE red
    logic hambn;   // N amber
    logic hgrnn;   // N green
    logic hr2;     // auxiliary lamp 2 (lit with N green)
    logic hambe;   // E amber
    logic hgrne;   // E green
    logic hr1;     // auxiliary lamp 1 (lit with E and LE green)
    logic hgrnle;  // LE green
  } lamps_t;

  // Queue detector qualifiers; 1 means the detector sees no queue.
  typedef struct packed {
    logic qn;
    logic qe;
    logic qle;
  } queues_t;

endpackage
