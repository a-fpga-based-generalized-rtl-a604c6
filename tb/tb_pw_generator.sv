// tb_pw_generator: checks the pulse width generator against the 3-D direct
// PWM equations written out independently here. For random Level, Mode and
// phase-to-neutral references p_j (on the 500-counts-per-level scale) it
// forms the leg references of the model:
//   centre-split: L_j = p_j + 250(N-1)
//   four-leg:     L_j = p_j + 250(N-1) - floor((pmax + pmin)/2), p_f = 0
// and checks
//   - every threshold T_jk = 500k - L_j and the pair-enable mask;
//   - volt-second balance: the on-times of the odd switches of a leg,
//     (500 - T_jk) clipped to 0..500, add up to L_j;
//   - four-leg mode: each phase-to-neutral difference L_j - L_f equals p_j,
//     and the all-on time (min L_j) equals the all-off time
//     (500(N-1) - max L_j) within one count.
module tb_pw_generator;
  import gpwm_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  ref3_t      ref_act = '0;
  logic [1:0] level = '0;
  logic       mode = 1'b0;
  th_arr_t    th;
  pair_bits_t pair_en;
  int         checks = 0, failures = 0;
  int         n_cs = 0, n_4l = 0, n_full_on = 0;

  pw_generator dut (.clk, .rst_n, .ref_act, .level, .mode, .th, .pair_en);

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

  function automatic int clip(input int x, input int lo, input int hi);
    return x < lo ? lo : (x > hi ? hi : x);
  endfunction

  initial begin
    int n1, mid, pmax, pmin, shift, sum, on_t;
    int p [4];
    int lref [4];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      n1  = $urandom_range(1, 4);
      mid = 250 * n1;
      mode = 1'(it % 2);
      level = 2'(n1 - 1);
      for (int j = 0; j < 3; j++)
        p[j] = mode ? $urandom_range(0, 2 * mid) - mid : $urandom_range(0, 2 * mid) - mid;
      p[3] = 0;
      for (int j = 0; j < 3; j++) ref_act[j] = DATA_W'(p[j] + mid);
      if (mode) begin
        pmax = p[0]; pmin = p[0];
        for (int j = 1; j < 4; j++) begin
          pmax = p[j] > pmax ? p[j] : pmax;
          pmin = p[j] < pmin ? p[j] : pmin;
        end
        shift = -int'($floor(real'(pmax + pmin) / 2.0));
        n_4l++;
      end else begin
        shift = 0;
        n_cs++;
      end
      for (int j = 0; j < 4; j++) lref[j] = p[j] + mid + shift;
      @(negedge clk);
      @(negedge clk);
      for (int j = 0; j < 4; j++) begin
        sum = 0;
        for (int k = 1; k <= 4; k++) begin
          bit en;
          en = (k <= n1) && (j < 3 || mode);
          check(pair_en[j][k-1] == en, $sformatf("pair enable leg %0d pair %0d", j, k));
          if (en) begin
            check(int'(th[j][k-1]) == 500 * k - lref[j],
                  $sformatf("N=%0d mode=%0d leg %0d pair %0d: T=%0d expected %0d",
                            n1 + 1, mode, j, k, th[j][k-1], 500 * k - lref[j]));
            on_t = clip(500 - int'(th[j][k-1]), 0, 500);
            if (on_t == 500) n_full_on++;
            sum += on_t;
          end
        end
        if ((j < 3 || mode) && lref[j] >= 0 && lref[j] <= 2 * mid)
          check(sum == lref[j], $sformatf("volt-second leg %0d: %0d vs %0d", j, sum, lref[j]));
      end
      if (mode) begin
        int lmax, lmin, dmin, dmax;
        lmax = lref[0]; lmin = lref[0];
        for (int j = 0; j < 4; j++) begin
          lmax = lref[j] > lmax ? lref[j] : lmax;
          lmin = lref[j] < lmin ? lref[j] : lmin;
        end
        // from the hardware: T_j1 = 500 - L_j
        dmin = 500 - int'(th[0][0]);
        dmax = dmin;
        for (int j = 0; j < 4; j++) begin
          dmin = (500 - int'(th[j][0])) < dmin ? 500 - int'(th[j][0]) : dmin;
          dmax = (500 - int'(th[j][0])) > dmax ? 500 - int'(th[j][0]) : dmax;
        end
        for (int j = 0; j < 3; j++)
          check(int'(th[3][0]) - int'(th[j][0]) == p[j], "phase-to-neutral preserved");
        check((dmin - (2 * mid - dmax)) inside {[-1:1]}, "equal zero-state times");
      end
    end
    check(n_cs > 0 && n_4l > 0 && n_full_on > 0, "both modes and full-on switches exercised");
    $display("centre-split cases %0d, four-leg cases %0d, full-on switches %0d", n_cs, n_4l, n_full_on);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
