// Full-size testbench: traffic_light_top at its default parameters.
//
// With the default 32.768 kHz clock and 2 s per count, one count is 65536
// cycles. The test takes the junction through one complete turn from
// power-up: N keeps its queue for the whole 18 s green, E's queue clears
// 4 s into its green, and LE has no queue at all so its green is skipped;
// the junction must then be back in ST0. tl_monitor checks state order,
// phase lengths, HCLRT, lamps and safety on every cycle. The total length
// of the turn is checked against the sum of its phases.
module tb_traffic_light_full;
  import traffic_pkg::*;

  localparam longint TC = 65536;

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
  longint cyc = 0, n, start;

  traffic_light_top dut (
    .clk, .rst, .qn, .qe, .qle, .lamps, .state, .count, .t, .hclrt, .port_word
  );

  tl_monitor #(.TC(TC)) mon (
    .clk, .rst, .state, .count, .hclrt, .lamps,
    .checks(m_checks), .failures(m_failures), .wraps, .entries
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic green_length(input state_e g, output longint len);
    while (state != g) @(negedge clk);
    len = 0;
    while (state == g) begin @(negedge clk); len++; end
  endtask

  initial begin
    rst = 1'b1; qn = 1'b0; qe = 1'b0; qle = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    start = cyc;
    // N: queue present for the whole green
    green_length(ST3, n);
    check("N green (18 s)", longint'(n), longint'(9 * TC));
    // E: queue clears 2 counts into the green
    while (state != ST7) @(negedge clk);
    repeat (int'(2 * TC)) @(negedge clk);
    qe = 1'b1;
    n = 0;
    while (state == ST7) begin @(negedge clk); n++; end
    check("E green ends after queue clears", longint'(n), longint'(3));
    // LE: no queue, green skipped
    green_length(ST11, n);
    check("LE green skipped", longint'(n), longint'(1));
    // turn length: N 16 counts + 2, E 9 counts + 2 + 3, LE 7 counts + 2 + 1
    check("cycles for one turn", longint'(cyc - start), longint'((16 * TC + 2) + (9 * TC + 5) + (7 * TC + 3)));
    @(negedge clk);
    check("back in ST0", longint'(state), longint'(ST0));
    check("lamps in ST0", longint'(lamps), longint'(lamps_t'(11'b1_1_1_0_0_0_0_0_0_0_0)));
    check("state entries", longint'(entries), longint'(12));
    checks += m_checks; failures += m_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (int'(40 * TC)) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end

endmodule
