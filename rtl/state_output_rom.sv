// State output ROM: turns the present state code into the 11 lamp lines.
//
// Every lamp is lit in more than one state, so a 4-to-16 decoder of the
// state code followed by an OR per lamp would be needed; that structure is a
// ROM, and the design uses a 16-word ROM addressed by D C B A directly. Each
// word holds the lamp bits in the order of traffic_pkg::lamps_t (HAMBLE in
// bit 10 down to HGRNLE in bit 0). A 1 switches the lamp on through its
// solid-state switch.
//
// Contents: in each four-state group one approach hands over (amber, the
// others red), then all red, then the receiving approach shows red+amber,
// then green with the others red. HR1 is lit with the E and LE greens, HR2
// with the N green. Addresses 12..15 hold all red, a safe pattern for
// codes the controller never uses.
//
// Interface and timing: purely combinational, addr to lamps, like the
// asynchronous ROM of the design. The lamp patterns follow the state outputs
// of the design's transition table; the HR2 entry and the unused words are
// this implementation's own choice.
module state_output_rom
  import traffic_pkg::*;
(
  input  logic [STATE_W-1:0] addr,   // present state code D C B A
  output lamps_t             lamps
);

  //                                  ALE RN RE RLE AN GN R2 AE GE R1 GLE
  localparam logic [NUM_LAMPS-1:0] ROM [16] = '{
    11'b1_1_1_0_0_0_0_0_0_0_0,  // ST0  LE amber, N red, E red
    11'b0_1_1_1_0_0_0_0_0_0_0,  // ST1  all red
    11'b0_1_1_1_1_0_0_0_0_0_0,  // ST2  N red+amber
    11'b0_0_1_1_0_1_1_0_0_0_0,  // ST3  N green, HR2
    11'b0_0_1_1_1_0_0_0_0_0_0,  // ST4  N amber
    11'b0_1_1_1_0_0_0_0_0_0_0,  // ST5  all red
    11'b0_1_1_1_0_0_0_1_0_0_0,  // ST6  E red+amber
    11'b0_1_0_1_0_0_0_0_1_1_0,  // ST7  E green, HR1
    11'b0_1_0_1_0_0_0_1_0_0_0,  // ST8  E amber
    11'b0_1_1_1_0_0_0_0_0_0_0,  // ST9  all red
    11'b1_1_1_1_0_0_0_0_0_0_0,  // ST10 LE red+amber
    11'b0_1_1_0_0_0_0_0_0_1_1,  // ST11 LE green, HR1
    11'b0_1_1_1_0_0_0_0_0_0_0,  // unused: all red
    11'b0_1_1_1_0_0_0_0_0_0_0,
    11'b0_1_1_1_0_0_0_0_0_0_0,
    11'b0_1_1_1_0_0_0_0_0_0_0
  };

  assign lamps = lamps_t'(ROM[addr]);

endmodule
