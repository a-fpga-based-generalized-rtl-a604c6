// tb_deadtime_controller: checks dead-time insertion. For SDP = 0, 1 and 2
// it toggles single pair triggers and measures the interval in which both
// switches of the pair are off, which must be 40 * 2^(SDP+1) clocks; checks
// that the odd switch follows the trigger and the even switch its
// complement, that the two are never on together, that a trigger pulse
// shorter than the dead time is swallowed, and that disabled pairs and a
// disabled controller keep both switches off.
module tb_deadtime_controller;
  import gpwm_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       enable = 1'b0;
  logic [2:0] sdp = '0;
  pair_bits_t trig = '0;
  pair_bits_t pair_en = '1;
  gate_t      gate;
  int         checks = 0, failures = 0;
  int         overlap = 0;

  deadtime_controller dut (.clk, .rst_n, .enable, .sdp, .trig, .pair_en, .gate);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // shoot-through monitor
  always @(negedge clk)
    for (int j = 0; j < N_LEGS; j++)
      for (int k = 0; k < MAX_PAIRS; k++)
        if (gate[j][2*k] && gate[j][2*k+1]) overlap++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int off_t, td, j, k;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(gate == '0, "all off while disabled");
    enable = 1'b1;
    repeat (2) @(negedge clk);
    // trig = 0 everywhere: odd off, even on
    for (int jj = 0; jj < N_LEGS; jj++)
      for (int kk = 0; kk < MAX_PAIRS; kk++)
        check(!gate[jj][2*kk] && gate[jj][2*kk+1], "even switch on for trigger 0");
    for (int s = 0; s < 3; s++) begin
      sdp = 3'(s);
      td = 40 << (s + 1);
      for (int rep = 0; rep < 4; rep++) begin
        j = $urandom_range(0, 3);
        k = $urandom_range(0, 3);
        @(negedge clk) trig[j][k] = !trig[j][k];
        off_t = 0;
        @(negedge clk);
        while (!gate[j][2*k] && !gate[j][2*k+1]) begin
          off_t++;
          @(negedge clk);
        end
        check(off_t == td, $sformatf("sdp %0d dead time %0d expected %0d", s, off_t, td));
        check(gate[j][2*k] == trig[j][k] && gate[j][2*k+1] == !trig[j][k],
              "new state after dead time");
        repeat (5) @(negedge clk);
      end
      // a pulse shorter than the dead time is swallowed
      @(negedge clk) trig[1][2] = !trig[1][2];
      repeat (td / 2) @(negedge clk);
      trig[1][2] = !trig[1][2];
      repeat (3) @(negedge clk);
      check(gate[1][4] == trig[1][2] && gate[1][5] == !trig[1][2], "short pulse swallowed");
    end
    // disabled pair
    pair_en[2][1] = 1'b0;
    repeat (2) @(negedge clk);
    check(gate[2][2] == 1'b0 && gate[2][3] == 1'b0, "disabled pair off");
    enable = 1'b0;
    repeat (2) @(negedge clk);
    check(gate == '0, "all off when disabled");
    check(overlap == 0, $sformatf("%0d cycles with both switches of a pair on", overlap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
