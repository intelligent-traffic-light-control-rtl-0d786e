// Checker for the traffic light top, shared by the end-to-end testbenches.
//
// Watches the top's outputs every clock and checks, independently of the
// RTL: the state order ST0..ST11 and round again; the length of every
// non-green state (hand-over amber 3 counts + 2 cycles of pipeline, red
// 1 count, red+amber 3 counts, with TC cycles per count); that HCLRT is
// high exactly in the cycle before a green state is left; that the counter
// is 0 on entry to each hand-over state; the lamp pattern of every state
// (built from the role each approach plays); and that no two approaches
// are ever green together. Green lengths depend on the queues and are
// checked by the driving testbench. It counts counter wraps, seen as a
// 15 -> 0 step of the count.
module tl_monitor
  import traffic_pkg::*;
#(
  parameter longint TC = 64'd4  // clock cycles per count
) (
  input logic               clk,
  input logic               rst,
  input state_e             state,
  input logic [COUNT_W-1:0] count,
  input logic               hclrt,
  input lamps_t             lamps,
  output int                checks,
  output int                failures,
  output int                wraps,
  output int                entries
);

  function automatic lamps_t expected(input int a);
    lamps_t  e = '0;
    logic [2:0] l [3];
    int step = a % 4, grp = a / 4;
    int recv = grp, hand = (grp + 2) % 3;
    for (int x = 0; x < 3; x++) begin
      l[x] = 3'b100;
      if (step == 0 && x == hand) l[x] = 3'b010;
      if (step == 2 && x == recv) l[x] = 3'b110;
      if (step == 3 && x == recv) l[x] = 3'b001;
    end
    {e.hredn,  e.hambn,  e.hgrnn}  = l[0];
    {e.hrede,  e.hambe,  e.hgrne}  = l[1];
    {e.hredle, e.hamble, e.hgrnle} = l[2];
    e.hr1 = step == 3 && recv != 0;
    e.hr2 = step == 3 && recv == 0;
    return e;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  longint cyc = 0, entry = 0, dur;
  longint prev;
  logic   hclrt_q;
  logic [COUNT_W-1:0] count_q;
  logic   started = 1'b0;

  initial begin
    checks = 0; failures = 0; wraps = 0; entries = 0;
  end

  // sample the Mealy HCLRT just before each edge
  always @(negedge clk) begin
    hclrt_q = hclrt;
    count_q = count;
  end

  always @(posedge clk) begin
    #1;
    cyc++;
    if (rst) begin
      prev = 0; entry = cyc; started = 1'b1;
    end else if (started) begin
      if (count_q == 4'd15 && count == 4'd0) wraps++;
      if (longint'(state) != prev) begin
        dur = cyc - entry;
        entries++;
        check("state order", longint'(state), longint'((prev + 1) % 12));
        case (prev % 4)
          0: check("hand-over amber length", longint'(dur), longint'(3 * TC + 2));
          1: check("red length", longint'(dur), longint'(TC));
          2: check("red+amber length", longint'(dur), longint'(3 * TC));
          default: ;
        endcase
        check("HCLRT on leaving", longint'(hclrt_q), longint'(int'(prev % 4 == 3)));
        if (int'(state) % 4 == 0) check("count at phase start", longint'(count), longint'(0));
        prev = longint'(state); entry = cyc;
      end else begin
        check("HCLRT while holding", longint'(hclrt_q), longint'(0));
      end
      check("lamps", longint'(lamps), longint'(expected(int'(state))));
      checks++;
      if (int'(lamps.hgrnn) + int'(lamps.hgrne) + int'(lamps.hgrnle) > 1) begin
        failures++;
        $display("FAIL conflicting greens at %0t", $time);
      end
    end
  end

endmodule
