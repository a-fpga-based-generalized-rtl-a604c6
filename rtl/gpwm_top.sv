// gpwm_top: generalized pulse width modulator for three-phase four-wire
// voltage source inverters (three-leg centre-split and four-leg, 2 to 5
// levels).
//
// A host writes three phase reference voltages and a control word over a
// 12-bit data / 3-bit address bus into the data buffer. The direct PWM core
// derives each leg's reference (adding the shifting voltage in four-leg
// mode), turns it into one compare threshold per switch pair and compares
// the thresholds with a symmetric 0..500..0 carrier. The dead-time
// controller produces the complementary gate signals of every switch with a
// dead time in each transition. The three-block structure (data buffer,
// direct PWM core, dead-time controller) and all numbers follow the
// published design; a write strobe, a read-back port and an active-low
// hardware reset are added here because a bus needs them.
//
// Outputs: gate[j][n-1] is the trigger of switch S_j,n, j = 0..3 for legs
// a, b, c and the fourth leg f, n = 1 .. 2(N-1). Odd n are the switches
// above the leg's output point and even n the switches below it (the
// published numbering rule); S_j(2k-1) and S_j(2k)
// form complementary pair k. Unused switches (n > 2(N-1), or leg f in
// centre-split mode) and all switches while the core is reset stay off.
// `carrier` and `carrier_down` expose the carrier for observation.
// Only the control fields that act at once (Reset, SPD, SDP) are taken from
// the live control word here; Level and Mode reach the core through the
// data buffer's period-aligned copy, and Handshaking is used inside the
// data buffer, so the linter reports those bits of `ctrl` as unused here.
module gpwm_top
  import gpwm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout,
  output gate_t             gate,
  output logic [CNT_W-1:0]  carrier,
  output logic              carrier_down
);
  ctrl_t      ctrl;
  ref3_t      ref_act;
  logic [1:0] level_act;
  logic       mode_act;
  logic       period_load;
  pair_bits_t trig, pair_en;

  data_buffer u_buf (
    .clk, .rst_n, .wr, .addr, .din, .dout,
    .period_load, .ctrl, .ref_act, .level_act, .mode_act
  );

  direct_pwm_core u_core (
    .clk, .rst_n,
    .run(ctrl.run), .spd(ctrl.spd),
    .ref_act, .level(level_act), .mode(mode_act),
    .period_load, .count(carrier), .down(carrier_down),
    .trig, .pair_en
  );

  deadtime_controller u_dt (
    .clk, .rst_n,
    .enable(ctrl.run), .sdp(ctrl.sdp),
    .trig, .pair_en, .gate
  );

endmodule
