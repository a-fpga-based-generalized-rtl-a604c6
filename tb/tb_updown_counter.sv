// tb_updown_counter: checks the triangular carrier. With a tick every
// second clock it follows the count for three periods against the
// triangle formula c(t) = t mod 1000 for the first half of a period and
// 1000 - (t mod 1000) for the second, checks the direction flag, that
// `period_load` comes exactly once per 1000 ticks together with the step
// back to 0, and that clearing `run` returns the count to 0 at once and
// holds it there.
module tb_updown_counter;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        run = 1'b0;
  logic        tick = 1'b0;
  logic [11:0] count;
  logic        down, period_load;
  int          checks = 0, failures = 0;

  updown_counter dut (.clk, .rst_n, .run, .tick, .count, .down, .period_load);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int p, exp_c, loads;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(count == 0 && period_load, "held at 0 with load while run=0");
    run = 1'b1;
    loads = 0;
    for (int t = 1; t <= 3000; t++) begin
      // one idle clock, then one tick
      @(negedge clk);
      check(!period_load, "no load between ticks");
      tick = 1'b1;
      #1;
      p = (t - 1) % 1000;
      exp_c = (p <= 500) ? p : 1000 - p;
      check(count == 12'(exp_c), $sformatf("tick %0d count %0d expected %0d", t, count, exp_c));
      check(down == (p >= 500), $sformatf("tick %0d direction", t));
      check(period_load == (p == 999), $sformatf("tick %0d period_load", t));
      if (period_load) loads++;
      @(negedge clk);
      tick = 1'b0;
    end
    check(loads == 3, $sformatf("%0d period loads in 3000 ticks", loads));
    check(count == 0 && !down, "count back at 0 after 3 periods");
    // stop in the middle of a period
    repeat (123) begin
      @(negedge clk) tick = 1'b1;
      @(negedge clk) tick = 1'b0;
    end
    check(count == 123, "count 123 before stop");
    run = 1'b0;
    @(negedge clk) tick = 1'b1;
    @(negedge clk) tick = 1'b0;
    check(count == 0 && !down, "cleared by run=0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
