// Self-checking testbench for timebase.
//
// Runs the divider at a reduced clock (CLK_HZ=3, 2 s per count, so one
// count every 6 cycles) and checks that tick is a single-cycle pulse
// exactly every 6 cycles, that the first tick comes 6 cycles after reset,
// and that clr restarts the period. It then checks the period of a second
// instance at its default parameters (65536 cycles) once.
module tb_timebase;

  localparam int unsigned HZ = 3, PER = 2, TC = HZ * PER;

  logic clk = 1'b0;
  logic rst, clr;
  logic tick, tick_full;
  int checks = 0, failures = 0;

  timebase #(.CLK_HZ(HZ), .COUNT_PERIOD_S(PER)) dut (.clk, .rst, .clr, .tick);
  timebase dut_full (.clk, .rst, .clr(1'b0), .tick(tick_full));

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  int since, ticks;
  int full_first, full_second;

  initial begin
    rst = 1'b1; clr = 1'b0;
    @(posedge clk); #1;
    check("tick in reset", longint'(tick), longint'(0));
    rst = 1'b0;
    since = 0; ticks = 0;
    for (int cyc = 0; cyc < 600; cyc++) begin
      @(negedge clk);
      clr = (cyc % 97 == 50);
      @(posedge clk); #1;
      since++;
      if (clr) begin
        check("tick after clr", longint'(tick), longint'(0));
        since = 0;
      end else if (tick) begin
        check("cycles between ticks", longint'(since), longint'(TC));
        since = 0; ticks++;
      end else if (since > TC) begin
        check("tick missing", longint'(since), longint'(TC));
        since = 0;
      end
    end
    check("ticks seen", longint'(int'(ticks > 80)), longint'(1));
    // default size: 2 s at 32.768 kHz
    full_first = -1; full_second = -1;
    for (int cyc = 1; cyc <= 140000 && full_second < 0; cyc++) begin
      @(posedge clk); #1;
      if (tick_full) begin
        if (full_first < 0) full_first = cyc; else full_second = cyc;
      end
    end
    check("default period", longint'(full_second) - longint'(full_first), longint'(65536));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
