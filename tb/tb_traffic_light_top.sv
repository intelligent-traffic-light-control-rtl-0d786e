// End-to-end testbench for traffic_light_top at a reduced clock.
//
// CLK_HZ=2 with 2 s per count gives 4 clock cycles per count, so a full
// turn of the junction takes a few hundred cycles. tl_monitor checks state
// order, phase lengths, HCLRT, lamps and safety on every cycle; this module
// drives the queue detectors and checks each green:
//   natural  queue present all the time: green lasts 9 counts
//   early    queue clears 2 counts into green: green ends 3 cycles later
//            (two synchroniser stages, one state register)
//   skip     no queue when green starts: green lasts a single cycle
// Every approach sees every mode, then a reset is applied in mid-run and
// the junction must start again from ST0. Each mechanism is counted and a
// mechanism that never happened counts as a failure.
module tb_traffic_light_top;
  import traffic_pkg::*;

  localparam int unsigned HZ = 2, PER = 2, TC = HZ * PER;

  typedef enum int {NATURAL, EARLY, SKIP} mode_e;

  logic               clk = 1'b0;
  logic               rst;
  logic               qn, qe, qle;
  lamps_t             lamps;
  state_e             state;
  logic [COUNT_W-1:0] count;
  logic               t, hclrt;
  logic [STATE_W:0]   port_word;

  int checks = 0, failures = 0;
  int m_checks, m_failures, wraps, entries;
  int seen [3][3];   // [approach][mode]
  int resets_mid_run = 0;

  traffic_light_top #(.CLK_HZ(HZ), .COUNT_PERIOD_S(PER)) dut (
    .clk, .rst, .qn, .qe, .qle, .lamps, .state, .count, .t, .hclrt, .port_word
  );

  tl_monitor #(.TC(longint'(TC))) mon (
    .clk, .rst, .state, .count, .hclrt, .lamps,
    .checks(m_checks), .failures(m_failures), .wraps, .entries
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic set_q(input int a, input logic v);
    case (a)
      0: qn = v;
      1: qe = v;
      default: qle = v;
    endcase
  endtask

  // Serve approach a (0 = N, 1 = E, 2 = LE) in the given mode.
  task automatic serve(input int a, input mode_e m);
    int g = 4 * a + 3;
    longint n;
    @(negedge clk);
    set_q(a, m == SKIP);
    while (int'(state) != g) @(negedge clk);
    n = 0;
    if (m == EARLY) begin
      repeat (2 * TC) begin @(negedge clk); n++; end
      check("still green before queue clears", longint'(int'(state)), longint'(g));
      set_q(a, 1'b1);
      n = 0;
    end
    while (int'(state) == g) begin @(negedge clk); n++; end
    case (m)
      NATURAL: check("natural green length", longint'(n), longint'(9 * TC));
      EARLY:   check("cycles from queue clear to end of green", longint'(n), longint'(3));
      SKIP:    check("skipped green length", longint'(n), longint'(1));
    endcase
    seen[a][m]++;
    set_q(a, 1'b0);
  endtask

  initial begin
    foreach (seen[i, j]) seen[i][j] = 0;
    rst = 1'b1; qn = 1'b0; qe = 1'b0; qle = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check("state after reset", longint'(state), longint'(ST0));
    check("count after reset", longint'(count), longint'(0));
    @(negedge clk) rst = 1'b0;
    serve(0, NATURAL); serve(1, NATURAL); serve(2, NATURAL);
    serve(0, EARLY);   serve(1, SKIP);    serve(2, EARLY);
    serve(0, SKIP);    serve(1, EARLY);   serve(2, SKIP);
    // reset while E shows red+amber
    while (state != ST6) @(negedge clk);
    repeat (TC) @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    check("state after mid-run reset", longint'(state), longint'(ST0));
    check("lamps after mid-run reset", longint'(lamps.hamble), longint'(1));
    rst = 1'b0;
    resets_mid_run++;
    serve(0, NATURAL); serve(1, NATURAL);
    // every mechanism must have happened
    for (int a = 0; a < 3; a++)
      for (int m = 0; m < 3; m++) check($sformatf("approach %0d mode %0d seen", a, m), longint'(int'(seen[a][m] > 0)), longint'(1));
    check("counter wrapped", longint'(int'(wraps > 0)), longint'(1));
    check("mid-run reset applied", longint'(resets_mid_run), longint'(1));
    check("state entries seen", longint'(int'(entries > 30)), longint'(1));
    $display("wraps=%0d entries=%0d natural=%0d/%0d/%0d early=%0d/%0d/%0d skip=%0d/%0d/%0d",
             wraps, entries, seen[0][0], seen[1][0], seen[2][0],
             seen[0][1], seen[1][1], seen[2][1], seen[0][2], seen[1][2], seen[2][2]);
    checks += m_checks; failures += m_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end

endmodule
