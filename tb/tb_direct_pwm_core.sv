// tb_direct_pwm_core: end-to-end check of the direct PWM core (divider,
// carrier, pulse width generator, comparator) with working references
// driven directly.
//
// For several Level / Mode / SPD settings with random references it
// measures, over one PWM period in steady state,
//   - the period length, which must be 1000 * 2^(SPD+1) clocks (f = F/r_c/1000);
//   - the number of clocks each odd-switch trigger is high, which must equal
//     2^(SPD+1) times the number of carrier states c in {0..500..1} with
//     c > T, T = 500k - L_j computed by the model of the 3-D direct PWM
//     (L_j = reference, plus the shifting voltage in four-leg mode);
//   - that disabled pairs stay low,
// and that clearing `run` stops the carrier at 0 with all triggers low.
module tb_direct_pwm_core;
  import gpwm_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             run = 1'b0;
  logic [2:0]       spd = '0;
  ref3_t            ref_act = '0;
  logic [1:0]       level = '0;
  logic             mode = 1'b0;
  logic             period_load, down;
  logic [CNT_W-1:0] count;
  pair_bits_t       trig, pair_en;
  int               checks = 0, failures = 0;

  direct_pwm_core dut (.clk, .rst_n, .run, .spd, .ref_act, .level, .mode,
                       .period_load, .count, .down, .trig, .pair_en);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // carrier states per period (0, 1..499 up, 500, 499..1 down) above T
  function automatic int states_above(input int t);
    int n;
    n = 0;
    if (t <= 0) return 1000;   // at or below 0: on for the whole period
    for (int c = 0; c <= 500; c++) if (c > t) n += (c == 0 || c == 500) ? 1 : 2;
    return n;
  endfunction

  task automatic wait_load();
    do begin
      @(posedge clk);
      #1;
    end while (!period_load);
  endtask

  initial begin
    int n1, mid, rc, pmax, pmin, shift, plen, th_m;
    int p [4];
    int lref [4];
    int high [4][4];
    static int cfg_n1 [6]  = '{1, 2, 4, 1, 2, 3};
    static int cfg_md [6]  = '{0, 0, 0, 1, 1, 1};
    static int cfg_spd [6] = '{0, 1, 0, 2, 0, 1};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cfg = 0; cfg < 6; cfg++) begin
      n1 = cfg_n1[cfg];
      mid = 250 * n1;
      mode = 1'(cfg_md[cfg]);
      level = 2'(n1 - 1);
      spd = 3'(cfg_spd[cfg]);
      rc = 1 << (cfg_spd[cfg] + 1);
      for (int j = 0; j < 3; j++) p[j] = $urandom_range(0, mid) - mid / 2;
      p[3] = 0;
      for (int j = 0; j < 3; j++) ref_act[j] = DATA_W'(p[j] + mid);
      shift = 0;
      if (mode) begin
        pmax = 0; pmin = 0;
        for (int j = 0; j < 3; j++) begin
          pmax = p[j] > pmax ? p[j] : pmax;
          pmin = p[j] < pmin ? p[j] : pmin;
        end
        shift = -int'($floor(real'(pmax + pmin) / 2.0));
      end
      for (int j = 0; j < 4; j++) lref[j] = p[j] + mid + shift;
      run = 1'b1;
      wait_load();
      wait_load();
      // one full period
      plen = 0;
      high = '{default: '{default: 0}};
      do begin
        @(posedge clk);
        #1;
        plen++;
        for (int j = 0; j < 4; j++)
          for (int k = 0; k < 4; k++) high[j][k] += int'(trig[j][k]);
      end while (!period_load);
      check(plen == 1000 * rc, $sformatf("period %0d clocks, expected %0d", plen, 1000 * rc));
      for (int j = 0; j < 4; j++)
        for (int k = 1; k <= 4; k++) begin
          if (k <= n1 && (j < 3 || mode)) begin
            th_m = 500 * k - lref[j];
            check(high[j][k-1] == rc * states_above(th_m),
                  $sformatf("cfg %0d leg %0d pair %0d: high %0d expected %0d",
                            cfg, j, k, high[j][k-1], rc * states_above(th_m)));
          end else begin
            check(high[j][k-1] == 0, "disabled pair stays low");
          end
        end
      // stop the core
      @(negedge clk) run = 1'b0;
      repeat (4) @(negedge clk);
      check(count == 0 && trig == '0, "held in reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
