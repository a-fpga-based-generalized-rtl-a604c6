// tb_data_buffer: checks the host register file. It writes random values to
// the three reference registers and the control register and reads them
// back, checks that unused addresses read 0 and ignore writes, that the
// control fields land on the documented bit positions, and that the
// working copy (references, Level, Mode) follows the host copy on
// `period_load` only while the Handshaking bit is 0.
module tb_data_buffer;
  import gpwm_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              wr = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  logic [DATA_W-1:0] din = '0;
  logic [DATA_W-1:0] dout;
  logic              period_load = 1'b0;
  ctrl_t             ctrl;
  ref3_t             ref_act;
  logic [1:0]        level_act;
  logic              mode_act;
  int                checks = 0, failures = 0;

  data_buffer dut (.clk, .rst_n, .wr, .addr, .din, .dout,
                   .period_load, .ctrl, .ref_act, .level_act, .mode_act);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic pulse_load();
    @(negedge clk) period_load = 1'b1;
    @(negedge clk) period_load = 1'b0;
  endtask

  initial begin
    int d, ra, rb, rc, cw;
    ref3_t prev;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 8; a++) begin
      bus_read(a, d);
      check(d == 0, $sformatf("address %0d reads 0 after reset", a));
    end
    for (int it = 0; it < 20; it++) begin
      ra = $urandom_range(0, 4095);
      rb = $urandom_range(0, 4095);
      rc = $urandom_range(0, 4095);
      // handshake = 1: references being modified
      cw = ($urandom_range(0, 4095) & ~(1 << 11)) | (1 << 7);
      bus_write(3, cw);
      bus_write(0, ra);
      bus_write(1, rb);
      bus_write(2, rc);
      bus_write(4 + it % 4, 12'hABC);   // unused address
      bus_read(0, d); check(d == ra, "read back ref a");
      bus_read(1, d); check(d == rb, "read back ref b");
      bus_read(2, d); check(d == rc, "read back ref c");
      bus_read(3, d); check(d == cw, "read back control");
      bus_read(4 + it % 4, d); check(d == 0, "unused address stays 0");
      check(ctrl.level == cw[1:0] && ctrl.spd == cw[4:2] && ctrl.mode == cw[5] &&
            ctrl.run == cw[6] && ctrl.handshake == cw[7] && ctrl.sdp == cw[10:8],
            "control bit positions");
      // load while modifying: working copy must not change
      prev = ref_act;
      pulse_load();
      check(ref_act == prev, "no update while handshake = 1");
      // ready: clear the handshake bit, then a load takes the new data
      bus_write(3, cw & ~(1 << 7));
      @(negedge clk);
      check(ref_act == prev, "no update before load");
      pulse_load();
      check(ref_act[LEG_A] == DATA_W'(ra) && ref_act[LEG_B] == DATA_W'(rb) &&
            ref_act[LEG_C] == DATA_W'(rc), "working references after load");
      check(level_act == cw[1:0] && mode_act == cw[5], "working level and mode after load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
