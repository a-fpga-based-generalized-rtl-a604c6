// pwm_comparator: the PWM comparator of the direct PWM core.
//
// For every leg j and switch pair k it compares the carrier count with the
// threshold T_jk from the pulse width generator; as in the published design,
// the trigger of the odd-numbered switch S_j(2k-1) is high while the count is
// larger than T_jk and low otherwise (the even switch of the pair is its
// complement, formed in the dead-time controller). The comparison is signed,
// so a negative threshold gives a switch that is on for the whole period and
// a threshold of 500 or more one that stays off. A threshold of exactly 0
// (leg reference exactly on a level boundary) is also treated as on for the
// whole period: the strict compare alone would turn the switch off for the
// single carrier state 0, while the switch belongs to the ones that stay on
// all period at that level (the published switching rule).
//
// Timing: the published design samples the comparison on the falling edge of
// the counter clock. Here the result is registered on the rising clock edge
// when `sample` is high; the core raises `sample` two clocks after each
// counter step, when count and thresholds have both settled (this
// implementation's choice). Triggers are cleared while `run` is low and are
// 0 for disabled pairs.
module pwm_comparator
  import gpwm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic             sample,
  input  logic [CNT_W-1:0] count,
  input  th_arr_t          th,
  input  pair_bits_t       pair_en,
  output pair_bits_t       trig      // [leg][pair k-1]: trigger of S_j(2k-1)
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig <= '0;
    end else if (!run) begin
      trig <= '0;
    end else if (sample) begin
      for (int j = 0; j < N_LEGS; j++)
        for (int k = 0; k < MAX_PAIRS; k++)
          trig[j][k] <= pair_en[j][k] &&
                        (($signed(TH_W'(count)) > th[j][k]) || (th[j][k] <= 0));
    end
  end

endmodule
