// Self-checking testbench for interval_timer.
//
// Applies count enables at random gaps, with occasional clears and one
// reset, and compares the count with a model counter and T with the timing
// truth table written out as a 16-entry table. It also checks that one turn
// of the counter gives the 3/1/3/9-count T pattern (6 s, 2 s, 6 s, 18 s at
// one count per 2 s) and that clr wins over a simultaneous count.
module tb_interval_timer;
  import traffic_pkg::*;

  logic               clk = 1'b0;
  logic               rst, clr, tick;
  logic [COUNT_W-1:0] count;
  logic               t;
  int checks = 0, failures = 0;

  // T for counts 0..15, index 0 first
  localparam logic [15:0] T_TABLE = 16'b1111_1111_1000_1000;

  interval_timer dut (.clk, .rst, .clr, .tick, .count, .t);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  int model;
  int run_len [4];

  initial begin
    rst = 1'b1; clr = 1'b0; tick = 1'b0;
    @(posedge clk); #1;
    check("count after reset", longint'(count), longint'(0));
    rst = 1'b0;
    model = 0;
    // one clean turn: measure the T runs in counts
    begin
      automatic int runs = 0; automatic logic prev = 1'b0; automatic int len = 0;
      for (int k = 0; k < 16; k++) begin
        check("T table", longint'(t), longint'(T_TABLE[count]));
        if (t != prev && k != 0) begin run_len[runs % 4] = len; runs++; len = 0; end
        prev = t; len++;
        @(negedge clk); tick = 1'b1; @(posedge clk); #1; tick = 1'b0;
        model = (model + 1) % 16;
        check("count", longint'(count), longint'(model));
      end
      run_len[3] = len;
      check("T low counts (amber hand-over)", longint'(run_len[0]), longint'(3));
      check("T high counts (red)", longint'(run_len[1]), longint'(1));
      check("T low counts (red+amber)", longint'(run_len[2]), longint'(3));
      check("T high counts (green)", longint'(run_len[3]), longint'(9));
    end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      tick = ($urandom_range(0, 2) == 0);
      clr  = ($urandom_range(0, 40) == 0);
      rst  = (cyc == 1500);
      @(posedge clk); #1;
      if (rst || clr) model = 0;
      else if (tick)  model = (model + 1) % 16;
      check("count", longint'(count), longint'(model));
      check("T", longint'(t), longint'(T_TABLE[model]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
