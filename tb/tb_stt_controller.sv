// Self-checking testbench for stt_controller.
//
// Drives T and the three queue qualifiers with random values every cycle
// and compares the state register, HCLRT and the output port word with a
// reference written from the phase rule rather than from the case table:
// each state belongs to a four-state group (hand-over amber, red,
// red+amber, green); the first and third wait for T=1, the second for T=0,
// the green state leaves with HCLRT when T=0 or when its approach reports
// no queue. It also counts every one of the 27 link paths and fails if any
// was never taken. A synchronous reset in mid-run is checked too.
module tb_stt_controller;
  import traffic_pkg::*;

  logic    clk = 1'b0;
  logic    rst;
  logic    t;
  queues_t q;
  state_e  state;
  logic    hclrt;
  logic [STATE_W:0] port_word;

  int checks = 0, failures = 0;
  int path_hits [1:27];

  stt_controller dut (.clk, .rst, .t, .q, .state, .hclrt, .port_word);

  always #5 clk = ~clk;

  // Reference: next state and HCLRT for a legal present state.
  function automatic void ref_step(input int s, input logic tt, input queues_t qq,
                                   output int ns, output logic clr, output int path);
    int   step  = s % 4;
    int   grp   = s / 4;
    logic empty = (grp == 0) ? qq.qn : (grp == 1) ? qq.qe : qq.qle;
    int   base  = grp * 9;         // 9 link paths per group
    logic go;
    clr = 1'b0;
    case (step)
      0: begin go = tt;  path = base + 1 + int'(go); end
      1: begin go = !tt; path = base + 3 + int'(go); end
      2: begin go = tt;  path = base + 5 + int'(go); end
      default: begin
        go  = !tt || empty;
        clr = go;
        path = !go ? base + 7 : (!empty ? base + 8 : base + 9);
      end
    endcase
    ns = go ? (s + 1) % 12 : s;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  int   exp_state;
  int   ns, path;
  logic clr;

  initial begin
    foreach (path_hits[i]) path_hits[i] = 0;
    rst = 1'b1; t = 1'b0; q = '0;
    @(posedge clk); @(posedge clk);
    #1 check("state after reset", longint'(state), longint'(0));
    check("port word after reset", longint'(port_word), longint'(0));
    rst = 1'b0;
    exp_state = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // bias T and the queue lines so that every state is held for a while
      t = ($urandom_range(0, 3) != 0) ? ~t : t;
      q = queues_t'($urandom_range(0, 7) & (($urandom_range(0, 3) == 0) ? 32'd7 : 32'd0));
      if (cyc == 12000) rst = 1'b1;
      if (cyc == 12001) rst = 1'b0;
      #1;
      if (!rst) begin
        ref_step(exp_state, t, q, ns, clr, path);
        check("hclrt", longint'(hclrt), longint'(clr));
        path_hits[path]++;
      end else begin
        ns = 0; clr = 1'b0;
      end
      @(posedge clk); #1;
      check("state", longint'(state), longint'(ns));
      if (!rst) check("port word", longint'(port_word), longint'({4'(ns), clr}));
      exp_state = ns;
    end
    for (int i = 1; i <= 27; i++) begin
      checks++;
      if (path_hits[i] == 0) begin
        failures++;
        $display("FAIL link path L%0d never taken", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
