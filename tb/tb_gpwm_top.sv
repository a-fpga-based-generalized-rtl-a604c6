// tb_gpwm_top: end-to-end test of the generalized PW modulator at its
// default parameters, driven over the 12-bit host bus like a host
// processor would.
//
// It runs the five inverter configurations of the published simulations
// (2-, 3- and 5-level three-leg centre-split; 2- and 3-level four-leg),
// one directed four-leg case (fourth-leg reference 1.4 levels: its lower
// pair on for the whole period, its upper pair for 0.4 of it) and one case
// at the published experimental timing (F/8 carrier clock, i.e. 5 kHz PWM
// from a 40 MHz clock, and a 4 us dead time), and checks the three-level
// switching table with references exactly on the levels. For each it measures, over
// one PWM period, how long every gate output is on and compares with the
// value expected from the 3-D direct PWM model written out here:
//   odd switch of pair k of leg j: carrier states above T = 500k - L_j,
//   times the carrier clock ratio, minus one dead time per turn-on;
//   even switch: the rest of the period minus one dead time.
// It also checks the period length, read-back, that the Handshaking bit
// holds new references back, that the Reset bit stops the core with all
// gates off, and that no pair ever has both switches on. Each mechanism is
// counted and one that never happened counts as a failure.
module tb_gpwm_top;
  import gpwm_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              wr = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  logic [DATA_W-1:0] din = '0;
  logic [DATA_W-1:0] dout;
  gate_t             gate;
  logic [CNT_W-1:0]  carrier;
  logic              carrier_down;
  int                checks = 0, failures = 0;
  int                overlap = 0;

  // mechanism counters
  int n_cfg_cs = 0, n_cfg_4l = 0, n_mode_switch = 0, n_level_change = 0;
  int n_hs_hold = 0, n_core_reset = 0, n_deadtime = 0, n_full_on = 0;
  int n_full_off = 0, n_shift = 0, n_readback = 0, n_table = 0;

  gpwm_top dut (.clk, .rst_n, .wr, .addr, .din, .dout, .gate, .carrier, .carrier_down);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    for (int j = 0; j < N_LEGS; j++)
      for (int n = 0; n < 2 * MAX_PAIRS; n += 2)
        if (gate[j][n] && gate[j][n+1]) overlap++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  task automatic bus_write(input int a, input int d);
    @(negedge clk);
    wr = 1'b1; addr = ADDR_W'(a); din = DATA_W'(d);
    @(negedge clk);
    wr = 1'b0;
  endtask

  task automatic bus_read(input int a, output int d);
    @(negedge clk);
    addr = ADDR_W'(a);
    #1 d = int'(dout);
  endtask

  function automatic int ctrl_word(input int n, input int mode, input int spd,
                                   input int run, input int hs, input int sdp);
    return (n - 2) | (spd << 2) | (mode << 5) | (run << 6) | (hs << 7) | (sdp << 8);
  endfunction

  // carrier states per period (0, 1..499 up, 500, 499..1 down) above T
  function automatic int states_above(input int t);
    int s;
    s = 0;
    if (t <= 0) return 1000;   // at or below 0: on for the whole period
    for (int c = 0; c <= 500; c++) if (c > t) s += (c == 0 || c == 500) ? 1 : 2;
    return s;
  endfunction

  // wait for the carrier to return to 0
  task automatic wait_period();
    logic [CNT_W-1:0] prev;
    prev = carrier;
    forever begin
      @(posedge clk);
      #1;
      if (carrier == 0 && prev == 1) break;
      prev = carrier;
    end
  endtask

  // model of the 3-D direct PWM: leg references from phase references
  task automatic model_legs(input int n1, input int mode, input int p [3], output int l [4]);
    int pmax, pmin, shift;
    pmax = 0; pmin = 0;
    for (int j = 0; j < 3; j++) begin
      pmax = p[j] > pmax ? p[j] : pmax;
      pmin = p[j] < pmin ? p[j] : pmin;
    end
    shift = mode ? -int'($floor(real'(pmax + pmin) / 2.0)) : 0;
    for (int j = 0; j < 3; j++) l[j] = p[j] + 250 * n1 + shift;
    l[3] = 250 * n1 + shift;
  endtask

  // measure one period and compare every gate with the model
  task automatic measure(input int n1, input int mode, input int spd, input int sdp,
                         input int l [4], input string tag);
    int rc, td, per, st, h, exp_odd, exp_even;
    int on_t [4][8];
    rc = 1 << (spd + 1);
    td = 40 << (sdp + 1);
    per = 1000 * rc;
    on_t = '{default: '{default: 0}};
    wait_period();
    for (int t = 0; t < per; t++) begin
      @(posedge clk);
      #1;
      for (int j = 0; j < 4; j++)
        for (int n = 0; n < 8; n++) on_t[j][n] += int'(gate[j][n]);
    end
    check(carrier == 0 && carrier_down == 1'b0, $sformatf("%s: period of %0d clocks", tag, per));
    for (int j = 0; j < 4; j++)
      for (int k = 1; k <= 4; k++) begin
        if (k <= n1 && (j < 3 || mode == 1)) begin
          st = states_above(500 * k - l[j]);
          h = st * rc;
          if (st == 1000) begin
            exp_odd = per; exp_even = 0; n_full_on++;
          end else if (st == 0) begin
            exp_odd = 0; exp_even = per; n_full_off++;
          end else begin
            exp_odd = h - td; exp_even = per - h - td; n_deadtime += 2;
          end
        end else begin
          exp_odd = 0; exp_even = 0;
        end
        check(on_t[j][2*k-2] == exp_odd,
              $sformatf("%s leg %0d S%0d on %0d expected %0d", tag, j, 2*k-1, on_t[j][2*k-2], exp_odd));
        check(on_t[j][2*k-1] == exp_even,
              $sformatf("%s leg %0d S%0d on %0d expected %0d", tag, j, 2*k, on_t[j][2*k-1], exp_even));
      end
  endtask

  // pick phase references whose leg references stay clear of level
  // boundaries, so that every switching pulse is longer than the dead time
  task automatic pick_refs(input int n1, input int mode, output int p [3], output int l [4]);
    bit ok;
    do begin
      for (int j = 0; j < 3; j++) p[j] = $urandom_range(0, 500 * n1) - 250 * n1;
      model_legs(n1, mode, p, l);
      ok = 1;
      for (int j = 0; j < 4; j++) begin
        if (j == 3 && mode == 0) continue;
        if (l[j] < 60 || l[j] > 500 * n1 - 60) ok = 0;
        if ((l[j] % 500) < 60 || (l[j] % 500) > 440) ok = 0;
      end
    end while (!ok);
  endtask

  task automatic load_refs(input int n1, input int mode, input int spd, input int sdp,
                           input int p [3]);
    int d;
    bus_write(ADDR_CTRL, ctrl_word(n1 + 1, mode, spd, 1, 1, sdp));
    for (int j = 0; j < 3; j++) bus_write(j, p[j] + 250 * n1);
    for (int j = 0; j < 3; j++) begin
      bus_read(j, d);
      check(d == p[j] + 250 * n1, "reference read-back");
      n_readback++;
    end
    bus_write(ADDR_CTRL, ctrl_word(n1 + 1, mode, spd, 1, 0, sdp));
  endtask

  initial begin
    int p [3];
    int l [4];
    int lold [4];
    int prev_mode, prev_n1, d;
    static int cfg_n1 [5] = '{1, 2, 4, 1, 2};
    static int cfg_md [5] = '{0, 0, 0, 1, 1};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    prev_mode = 0;
    prev_n1 = 1;
    // start the core: Reset bit from 0 to 1
    bus_write(ADDR_CTRL, ctrl_word(2, 0, 0, 0, 0, 0));
    bus_read(ADDR_CTRL, d);
    check(d == ctrl_word(2, 0, 0, 0, 0, 0), "control read-back");
    repeat (50) @(negedge clk);
    check(carrier == 0 && gate == '0, "core held in reset after power-up");
    // the five published configurations
    for (int c = 0; c < 5; c++) begin
      pick_refs(cfg_n1[c], cfg_md[c], p, l);
      load_refs(cfg_n1[c], cfg_md[c], 0, 0, p);
      if (cfg_md[c] != prev_mode) n_mode_switch++;
      if (cfg_n1[c] != prev_n1) n_level_change++;
      if (cfg_md[c] == 1 && l[3] != 250 * cfg_n1[c]) n_shift++;
      prev_mode = cfg_md[c];
      prev_n1 = cfg_n1[c];
      wait_period();
      measure(cfg_n1[c], cfg_md[c], 0, 0, l,
              $sformatf("%0d-level %s", cfg_n1[c] + 1, cfg_md[c] ? "four-leg" : "centre-split"));
      if (cfg_md[c]) n_cfg_4l++; else n_cfg_cs++;
    end
    // directed: three-level four-leg, fourth-leg reference 1.4 levels
    p = '{-400, -100, 0};
    model_legs(2, 1, p, l);
    check(l[3] == 700, "fourth-leg reference of 1.4 levels");
    load_refs(2, 1, 0, 0, p);
    wait_period();
    measure(2, 1, 0, 0, l, "fourth leg at 1.4");
    // switching table of a three-level leg: references exactly at 0, E, 2E
    // must hold levels 0, 1, 2 for the whole period with
    //   0 : S1 off S2 on  S3 off S4 on
    //   E : S1 on  S2 off S3 off S4 on
    //   2E: S1 on  S2 off S3 on  S4 off
    p = '{-500, 0, 500};
    model_legs(2, 0, p, l);
    load_refs(2, 0, 0, 0, p);
    n_mode_switch++;
    wait_period();
    measure(2, 0, 0, 0, l, "three-level switching table");
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      if (gate[0][3:0] != 4'b1010 || gate[1][3:0] != 4'b1001 || gate[2][3:0] != 4'b0101)
        t = 1000;
    end
    check(gate[0][3:0] == 4'b1010 && gate[1][3:0] == 4'b1001 && gate[2][3:0] == 4'b0101,
          "three-level switching table");
    n_table++;
    // back to four-leg for the handshake test
    p = '{-400, -100, 0};
    model_legs(2, 1, p, l);
    load_refs(2, 1, 0, 0, p);
    n_mode_switch++;
    wait_period();
    // handshake: new references written while the bit is set are held back
    lold = l;
    bus_write(ADDR_CTRL, ctrl_word(3, 1, 0, 1, 1, 0));
    p = '{-300, 200, 150};
    for (int j = 0; j < 3; j++) bus_write(j, p[j] + 500);
    wait_period();
    measure(2, 1, 0, 0, lold, "handshake hold");
    n_hs_hold++;
    bus_write(ADDR_CTRL, ctrl_word(3, 1, 0, 1, 0, 0));
    model_legs(2, 1, p, l);
    wait_period();
    measure(2, 1, 0, 0, l, "handshake release");
    // published experimental timing: F/8 carrier clock, 4 us dead time
    pick_refs(2, 0, p, l);
    load_refs(2, 0, 2, 1, p);
    n_mode_switch++;
    wait_period();
    measure(2, 0, 2, 1, l, "5 kHz three-level centre-split");
    // Reset bit: core stops, every gate off
    bus_write(ADDR_CTRL, ctrl_word(3, 0, 2, 0, 0, 1));
    repeat (5) @(negedge clk);
    begin
      bit all_off;
      all_off = 1;
      for (int t = 0; t < 3000; t++) begin
        @(negedge clk);
        if (gate != '0 || carrier != 0) all_off = 0;
      end
      check(all_off, "Reset bit stops the core with all gates off");
      n_core_reset++;
    end
    check(overlap == 0, $sformatf("%0d cycles with both switches of a pair on", overlap));
    $display("mechanisms: centre-split configs %0d, four-leg configs %0d, mode switches %0d, level changes %0d",
             n_cfg_cs, n_cfg_4l, n_mode_switch, n_level_change);
    $display("            shifted four-leg references %0d, handshake holds %0d, core resets %0d",
             n_shift, n_hs_hold, n_core_reset);
    $display("            switches with dead time %0d, full-on %0d, full-off %0d, read-backs %0d",
             n_deadtime, n_full_on, n_full_off, n_readback);
    check(n_cfg_cs == 3 && n_cfg_4l == 2, "all five configurations run");
    check(n_mode_switch > 0, "mode switch happened");
    check(n_level_change > 0, "level change happened");
    check(n_shift > 0, "shifting voltage applied");
    check(n_hs_hold > 0, "handshake hold happened");
    check(n_core_reset > 0, "core reset happened");
    check(n_deadtime > 0, "dead time inserted");
    check(n_full_on > 0, "full-period switch happened");
    check(n_full_off > 0, "always-off switch happened");
    check(n_readback > 0, "read-back happened");
    check(n_table > 0, "switching table case run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
