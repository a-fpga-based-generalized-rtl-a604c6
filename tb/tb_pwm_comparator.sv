// tb_pwm_comparator: checks the comparator. With random carrier counts,
// signed thresholds (including negative ones, zero and ones above the peak)
// and pair-enable masks it checks that each trigger is enable AND
// (count > T or T = 0),
// taken only on `sample`, held otherwise, and cleared while `run` is low.
module tb_pwm_comparator;
  import gpwm_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             run = 1'b0;
  logic             sample = 1'b0;
  logic [CNT_W-1:0] count = '0;
  th_arr_t          th = '0;
  pair_bits_t       pair_en = '0;
  pair_bits_t       trig;
  pair_bits_t       expv, held;
  int               checks = 0, failures = 0;

  pwm_comparator dut (.clk, .rst_n, .run, .sample, .count, .th, .pair_en, .trig);

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
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      count = CNT_W'($urandom_range(0, 500));
      for (int j = 0; j < N_LEGS; j++)
        for (int k = 0; k < MAX_PAIRS; k++) begin
          th[j][k] = TH_W'($urandom_range(0, 1600) - 550);
          if (it % 5 == 0) th[j][k] = TH_W'(int'(count) - 1 + $urandom_range(0, 2));
          pair_en[j][k] = ($urandom_range(0, 7) != 0);
          if (it % 7 == 0) th[j][k] = TH_W'(0);
          expv[j][k] = pair_en[j][k] && (int'(count) > int'(th[j][k]) || int'(th[j][k]) == 0);
        end
      held = trig;
      sample = (it % 3 != 0);
      @(negedge clk);
      sample = 1'b0;
      if (it % 3 != 0) check(trig == expv, $sformatf("compare, count=%0d", count));
      else             check(trig == held, "hold without sample");
    end
    // run low clears
    count = CNT_W'(500);
    th = '{default: '{default: TH_W'(-5)}};
    pair_en = '1;
    sample = 1'b1;
    @(negedge clk);
    check(trig == '1, "all on with negative thresholds");
    run = 1'b0;
    @(negedge clk);
    check(trig == '0, "cleared when run low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
