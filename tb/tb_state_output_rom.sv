// Self-checking testbench for state_output_rom.
//
// Reads all 16 addresses and compares the lamp word with a pattern built
// from the role each approach plays in the state: the approach handing over
// shows amber in the first state of a group, all approaches are red in the
// second, the receiving approach shows red+amber in the third and green in
// the fourth, every other approach shows red. HR1 goes with the E and LE
// greens, HR2 with the N green; unused codes show all red. It also checks
// two safety rules on every word: at most one green, and no approach green
// and red at once.
module tb_state_output_rom;
  import traffic_pkg::*;

  logic [STATE_W-1:0] addr;
  lamps_t             lamps;
  int checks = 0, failures = 0;

  state_output_rom dut (.addr, .lamps);

  // approach index: 0 = N, 1 = E, 2 = LE; lamp triple {red, amber, green}
  function automatic lamps_t expected(input int a);
    lamps_t  e = '0;
    logic [2:0] l [3];
    int step = a % 4, grp = a / 4;
    int recv = grp;              // approach receiving right of way
    int hand = (grp + 2) % 3;    // approach handing it over
    for (int x = 0; x < 3; x++) begin
      l[x] = 3'b100;
      if (a < 12) begin
        if (step == 0 && x == hand) l[x] = 3'b010;
        if (step == 2 && x == recv) l[x] = 3'b110;
        if (step == 3 && x == recv) l[x] = 3'b001;
      end
    end
    {e.hredn,  e.hambn,  e.hgrnn}  = l[0];
    {e.hrede,  e.hambe,  e.hgrne}  = l[1];
    {e.hredle, e.hamble, e.hgrnle} = l[2];
    e.hr1 = (a < 12) && step == 3 && recv != 0;
    e.hr2 = (a < 12) && step == 3 && recv == 0;
    return e;
  endfunction

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      checks++;
      if (lamps !== expected(a)) begin
        failures++;
        $display("FAIL addr %0d: got %b expected %b", a, lamps, expected(a));
      end
      checks++;
      if (int'(lamps.hgrnn) + int'(lamps.hgrne) + int'(lamps.hgrnle) > 1) begin
        failures++;
        $display("FAIL addr %0d: conflicting greens", a);
      end
      checks++;
      if ((lamps.hgrnn && lamps.hredn) || (lamps.hgrne && lamps.hrede) ||
          (lamps.hgrnle && lamps.hredle)) begin
        failures++;
        $display("FAIL addr %0d: green and red together", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
