// tb_sine_workload: runs the modulator, at its default parameters, the way
// a host controller does in a three-phase four-wire application. Every PWM
// period the host writes a new sample of three phase-to-neutral references
// through the handshake protocol: set Handshaking, write a, b, c, clear
// Handshaking. The references are unbalanced and one carries harmonic
// injection:
//   a: 0.48 sin(wt) + 0.48 sin(3wt)   (fundamental plus third harmonic)
//   b: 0.85 sin(wt - 120 deg)
//   c: 0.57 sin(wt + 120 deg)
// in units of half the dc bus. One fundamental cycle lasts 40 PWM periods.
// This is done for the five configurations of the published simulations:
// 2-, 3- and 5-level three-leg centre-split and 2- and 3-level four-leg.
//
// Check, per period and leg: the time-average output level of the leg is
// the sum over its pairs of the odd-switch on-times divided by the period,
// with one dead time added back for every turn-on of an odd switch seen in
// the period (the delay the dead-time controller inserts). It must equal the
// leg reference of that period (volt-second balance) within one dead time
// plus a few clocks: a pulse shorter than the dead time is swallowed, and a
// turn-on delay may straddle the period boundary. In four-leg mode the
// average phase-to-neutral voltage (leg j minus leg f) must equal the phase
// reference within two such margins.
module tb_sine_workload;
  import gpwm_pkg::*;

  localparam int RC  = 2;           // SPD = 0: carrier clock F/2
  localparam int PER = 1000 * RC;   // clocks per PWM period
  localparam int TD  = 40 * 2;      // SDP = 0: dead time in clocks
  localparam int TOL = TD + 4 * RC + 8;
  localparam int NPER = 40;         // PWM periods per fundamental cycle

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
  int                worst = 0;
  int                n_turn_on = 0;

  gpwm_top dut (.clk, .rst_n, .wr, .addr, .din, .dout, .gate, .carrier, .carrier_down);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  function automatic int ctrl_word(input int n, input int mode, input int run, input int hs);
    return (n - 2) | (mode << 5) | (run << 6) | (hs << 7);
  endfunction

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

  // phase references in counts for sample s
  function automatic int pref(input int j, input int s, input int n1);
    real w, half, v;
    w = 2.0 * 3.14159265358979 * real'(s) / real'(NPER);
    half = 250.0 * real'(n1);
    case (j)
      0: v = 0.48 * $sin(w) + 0.48 * $sin(3.0 * w);
      1: v = 0.85 * $sin(w - 2.0943951);
      default: v = 0.57 * $sin(w + 2.0943951);
    endcase
    return int'($floor(half * v));
  endfunction

  // model leg references (3-D direct PWM, with shifting voltage in mode 1)
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

  task automatic write_sample(input int n1, input int mode, input int p [3]);
    bus_write(ADDR_CTRL, ctrl_word(n1 + 1, mode, 1, 1));
    for (int j = 0; j < 3; j++) bus_write(j, p[j] + 250 * n1);
    bus_write(ADDR_CTRL, ctrl_word(n1 + 1, mode, 1, 0));
  endtask

  initial begin
    static int cfg_n1 [5] = '{1, 2, 4, 1, 2};
    static int cfg_md [5] = '{0, 0, 0, 1, 1};
    int p [3];
    int pnext [3];
    int l [4];
    int lvl [4];
    int err, n1, md;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 5; c++) begin
      n1 = cfg_n1[c];
      md = cfg_md[c];
      // restart the core for the new configuration with the first sample
      bus_write(ADDR_CTRL, ctrl_word(n1 + 1, md, 0, 0));
      for (int j = 0; j < 3; j++) p[j] = pref(j, 0, n1);
      write_sample(n1, md, p);
      wait_period();
      for (int s = 0; s < NPER; s++) begin
        // during period s: measure it and send the sample for period s+1
        for (int j = 0; j < 3; j++) pnext[j] = pref(j, s + 1, n1);
        model_legs(n1, md, p, l);
        lvl = '{default: 0};
        fork
          begin
            gate_t prev_g;
            prev_g = gate;
            for (int t = 0; t < PER; t++) begin
              @(posedge clk);
              #1;
              for (int j = 0; j < 4; j++)
                for (int k = 0; k < 4; k++) begin
                  lvl[j] += int'(gate[j][2*k]);
                  // every turn-on of an odd switch was delayed by one dead time
                  if (gate[j][2*k] && !prev_g[j][2*k]) begin
                    lvl[j] += TD;
                    n_turn_on++;
                  end
                end
              prev_g = gate;
            end
          end
          begin
            repeat (20) @(negedge clk);
            write_sample(n1, md, pnext);
          end
        join
        // lvl[j] is in clocks of "one level"; the reference in counts is
        // l[j], so compare lvl[j] with l[j] * PER / 500
        for (int j = 0; j < 4; j++) begin
          if (j == 3 && md == 0) continue;
          err = lvl[j] - l[j] * PER / 500;
          worst = (err < 0 ? -err : err) > worst ? (err < 0 ? -err : err) : worst;
          check(err >= -TOL && err <= TOL,
                $sformatf("N=%0d mode %0d period %0d leg %0d: %0d clocks of level, expected %0d",
                          n1 + 1, md, s, j, lvl[j], l[j] * PER / 500));
        end
        if (md == 1)
          for (int j = 0; j < 3; j++) begin
            err = (lvl[j] - lvl[3]) - p[j] * PER / 500;
            check(err >= -2 * TOL && err <= 2 * TOL,
                  $sformatf("N=%0d period %0d phase %0d-to-neutral off by %0d clocks",
                            n1 + 1, s, j, err));
          end
        p = pnext;
        // wait_period is not needed: the window was exactly one period
      end
    end
    check(n_turn_on > 0, "odd switches turned on");
    $display("odd-switch turn-ons %0d", n_turn_on);
    $display("largest volt-second error %0d clocks of %0d per period (tolerance %0d)",
             worst, PER, TOL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
