// deadtime_controller: dead-time insertion for every switch pair.
//
// For each leg and switch pair k it drives the odd switch S_j(2k-1) with the
// pair's trigger and the even switch S_j(2k) with its complement, and keeps
// both switches off for a dead time T_d after every change of the trigger,
// so that the switch being turned off has stopped conducting before its
// partner turns on. As published, T_d is DT_TICKS (40) periods of the input
// clock scaled by 2^(SDP+1): T_d = 40 / (F / 2^(SDP+1)). A trigger pulse
// shorter than T_d is swallowed.
//
// How the delay is counted is this implementation's choice: each pair has
// its own counter of input clocks that restarts at every trigger change and
// ends after 40 * 2^(SDP+1) clocks, which is the published 0..40 count of the
// scaled clock with the scaler aligned to the edge; this makes T_d exact
// instead of jittering by one scaled clock.
//
// Timing: gate outputs are registered. After a trigger change both gates
// of the pair go off one clock later and the new state appears
// 40 * 2^(SDP+1) clocks after that. While `enable` is low (core held in
// reset) or for a disabled pair, both gates are off and the pair follows its
// trigger without delay once enabled, since starting from all-off needs no
// dead time. An assertion checks that no pair ever has both gates on.
module deadtime_controller
  import gpwm_pkg::*;
#(
  parameter int unsigned DT = DT_TICKS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic [2:0] sdp,
  input  pair_bits_t trig,
  input  pair_bits_t pair_en,
  output gate_t      gate     // [leg][n-1] drives switch S_j,n
);
  localparam int unsigned DW = $clog2(DT * 256 + 1);

  pair_bits_t          cur;                 // state currently applied
  logic [DW-1:0]       cnt [N_LEGS][MAX_PAIRS];
  logic [DW-1:0]       last;

  always_comb last = DW'((DT << (sdp + 1)) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur  <= '0;
      gate <= '0;
      for (int j = 0; j < N_LEGS; j++)
        for (int k = 0; k < MAX_PAIRS; k++) cnt[j][k] <= '0;
    end else begin
      for (int j = 0; j < N_LEGS; j++) begin
        for (int k = 0; k < MAX_PAIRS; k++) begin
          if (!enable || !pair_en[j][k]) begin
            cur[j][k]        <= trig[j][k];
            cnt[j][k]        <= '0;
            gate[j][2*k]     <= 1'b0;
            gate[j][2*k + 1] <= 1'b0;
          end else if (trig[j][k] != cur[j][k]) begin
            // change pending: both switches off until the dead time is over
            if (cnt[j][k] == last) begin
              cur[j][k] <= trig[j][k];
              cnt[j][k] <= '0;
            end else begin
              cnt[j][k] <= cnt[j][k] + 1'b1;
            end
            gate[j][2*k]     <= 1'b0;
            gate[j][2*k + 1] <= 1'b0;
          end else begin
            cnt[j][k]        <= '0;
            gate[j][2*k]     <= cur[j][k];   // odd switch S_j(2k+1)
            gate[j][2*k + 1] <= !cur[j][k];  // even switch S_j(2k+2)
          end
        end
      end
    end
  end

  // safety rule: the two switches of a pair are never on together
  pair_bits_t overlap;
  always_comb
    for (int j = 0; j < N_LEGS; j++)
      for (int k = 0; k < MAX_PAIRS; k++)
        overlap[j][k] = gate[j][2*k] && gate[j][2*k + 1];

  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n) overlap == '0)
    else $error("both switches of a pair are on");

endmodule
