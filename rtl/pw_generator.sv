// pw_generator: the pulse width generator of the direct PWM core.
//
// It implements the generalized 3-D direct PWM. Every leg j of an N-level
// inverter has 2(N-1) switches; odd switch S_j(2k-1) and even switch S_j(2k)
// form pair k (k = 1 .. N-1) and are always complementary. With a leg
// reference V_j on the 500-counts-per-level scale, the leg switches between
// levels Int(V_j/500) and Int(V_j/500)+1, and the odd switch of pair k must
// be on for (V_j - 500(k-1))/500 of the period, clipped to 0..1. On a
// symmetric 0..500..0 carrier this is obtained by turning the switch on while
// the carrier is larger than the threshold
//     T_jk = 500*k - V_j          (= 500 - pulse width of the switch).
// No switching table is needed for any N.
//
// Leg references:
//   Mode 0 (three-leg centre-split): V_j = Vref_j for j = a, b, c; the fourth
//     leg is unused and its pairs are disabled.
//   Mode 1 (four-leg): with Vref_f = 250(N-1) (a zero phase-to-neutral
//     reference for the fourth leg) and Vmax / Vmin the largest / smallest of
//     Vref_a, Vref_b, Vref_c, Vref_f,
//       V_j = Vref_j + Vshift - 250(N-1),  Vshift = 500(N-1) - (Vmax+Vmin)/2
//     for j = a, b, c, f. This centres the four leg references in the dc bus
//     so that the all-off and all-on zero states last equally long. The
//     division by 2 truncates.
// Both formulas and the threshold follow the published algorithm; the
// register stage, the widths and the truncation are this implementation's.
//
// Timing: thresholds and the pair-enable mask are registered, valid one
// clock after the inputs change. Pair k of a leg is enabled when k <= N-1
// (and, for the fourth leg, in Mode 1).
module pw_generator
  import gpwm_pkg::*;
#(
  parameter int unsigned HALF = HALF_PERIOD
) (
  input  logic       clk,
  input  logic       rst_n,
  input  ref3_t      ref_act,
  input  logic [1:0] level,     // N - 2
  input  logic       mode,      // 0 centre-split, 1 four-leg
  output th_arr_t    th,
  output pair_bits_t pair_en
);
  // all arithmetic in TH_W-bit signed numbers: references are below 2^12
  th_t        th_c [N_LEGS][MAX_PAIRS];
  pair_bits_t en_c;
  th_t        n1, mid, vmax, vmin, vshift;
  th_t        r [N_LEGS];
  th_t        v [N_LEGS];

  always_comb begin
    n1  = th_t'(level) + th_t'(1);
    mid = th_t'(HALF / 2) * n1;
    for (int j = 0; j < 3; j++) r[j] = th_t'(ref_act[j]);
    r[LEG_F] = mid;
    vmax = r[0];
    vmin = r[0];
    for (int j = 1; j < N_LEGS; j++) begin
      if (r[j] > vmax) vmax = r[j];
      if (r[j] < vmin) vmin = r[j];
    end
    vshift = mode ? (th_t'(HALF) * n1 - ((vmax + vmin) >>> 1)) : mid;
    for (int j = 0; j < N_LEGS; j++) v[j] = r[j] + vshift - mid;
    for (int j = 0; j < N_LEGS; j++) begin
      for (int k = 1; k <= MAX_PAIRS; k++) begin
        th_c[j][k-1] = th_t'(HALF * k) - v[j];
        en_c[j][k-1] = (th_t'(k) <= n1) && (j != LEG_F || mode);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      th      <= '0;
      pair_en <= '0;
    end else begin
      for (int j = 0; j < N_LEGS; j++)
        for (int k = 0; k < MAX_PAIRS; k++) th[j][k] <= th_c[j][k];
      pair_en <= en_c;
    end
  end

endmodule
