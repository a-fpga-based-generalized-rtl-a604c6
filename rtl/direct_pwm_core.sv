// direct_pwm_core: the direct PWM core of the modulator.
//
// Structure as published: a divide-by-n counter scales the input clock by
// 2^(SPD+1); the scaled clock steps the 12-bit up-down carrier counter
// (0 -> 500 -> 0, so one PWM period is 1000 scaled clocks and the PWM
// frequency is F / 2^(SPD+1) / 1000); the pulse width generator turns the
// working references, Level and Mode into one threshold per switch pair;
// and the comparator turns carrier and thresholds into the triggers of the
// odd-numbered switches.
//
// Timing: the carrier steps on a divider tick; the thresholds of a new
// period are registered one clock after `period_load`; the comparator
// samples two clocks after each tick, so a trigger changes three clocks
// after the carrier step that caused it. The core is held in reset (carrier
// at 0, triggers low) while the control register's Reset bit `run` is 0 and
// starts counting from 0 when it is set.
module direct_pwm_core
  import gpwm_pkg::*;
#(
  parameter int unsigned HALF = HALF_PERIOD
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic [2:0]       spd,
  input  ref3_t            ref_act,
  input  logic [1:0]       level,
  input  logic             mode,
  output logic             period_load,
  output logic [CNT_W-1:0] count,
  output logic             down,
  output pair_bits_t       trig,
  output pair_bits_t       pair_en
);
  logic    tick;
  logic    tick_d1, sample;
  th_arr_t th;

  clk_divider u_div (
    .clk, .rst_n, .clr(!run), .sel(spd), .tick
  );

  updown_counter #(.CNT_W(CNT_W), .PEAK(HALF)) u_cnt (
    .clk, .rst_n, .run, .tick, .count, .down, .period_load
  );

  pw_generator #(.HALF(HALF)) u_pwg (
    .clk, .rst_n, .ref_act, .level, .mode, .th, .pair_en
  );

  // sample the comparison two clocks after each carrier step
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick_d1 <= 1'b0;
      sample  <= 1'b0;
    end else begin
      tick_d1 <= tick;
      sample  <= tick_d1;
    end
  end

  pwm_comparator u_cmp (
    .clk, .rst_n, .run, .sample, .count, .th, .pair_en, .trig
  );

endmodule
