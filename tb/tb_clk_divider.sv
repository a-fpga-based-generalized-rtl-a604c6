// tb_clk_divider: checks the divide-by-n counter. For every selector value
// 0..7 it measures the spacing of consecutive ticks (must be 2^(sel+1)
// clocks), the delay of the first tick after `clr` is released (it
// enables the 2^(sel+1)-th clock edge) and that no tick appears while `clr` is high.
module tb_clk_divider;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       clr = 1'b1;
  logic [2:0] sel = '0;
  logic       tick;
  int         checks = 0, failures = 0;

  clk_divider dut (.clk, .rst_n, .clr, .sel, .tick);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int t, last_t, expected;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 8; s++) begin
      clr = 1'b1;
      sel = 3'(s);
      expected = 1 << (s + 1);
      // no tick while cleared
      for (int i = 0; i < 600; i++) begin
        @(negedge clk);
        if (tick) check(0, $sformatf("tick while clr, sel=%0d", s));
      end
      check(1, "clr hold");
      @(negedge clk) clr = 1'b0;
      t = 0;
      last_t = 0;
      // first tick: expected clocks after release, then 4 more periods
      for (int n = 0; n < 5; n++) begin
        do begin
          @(posedge clk);
          #1 t++;
        end while (!tick);
        // the tick is visible during the clock before the edge it enables,
        // so the first one shows one clock before the 2^(sel+1)-th edge
        check(t - last_t == expected - (n == 0 ? 1 : 0),
              $sformatf("sel=%0d tick spacing %0d, expected %0d", s, t - last_t, expected));
        last_t = t;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
