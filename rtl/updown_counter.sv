// updown_counter: the 12-bit triangular carrier of the direct PWM core.
//
// Following the published design, the counter starts when the core is
// released from reset (control bit "Reset" going 0 -> 1), counts up from 0
// to PEAK (500) and then down again to 0, one step per `tick` from the
// divide-by-n counter. One PWM period is therefore 2*PEAK = 1000 ticks and
// the PWM frequency is F / r_c / 1000. While `run` is low the count is held
// at 0 and the direction set to up.
//
// `period_load` is a one-cycle pulse issued together with the tick that
// brings the count back to 0 (and, as this implementation's choice, on every
// cycle while `run` is low); it tells the data buffer to take over new
// references so that every period starts with consistent data.
module updown_counter #(
  parameter int unsigned CNT_W = 12,
  parameter int unsigned PEAK  = 500
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic             tick,
  output logic [CNT_W-1:0] count,
  output logic             down,         // 1 while counting down
  output logic             period_load
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      down  <= 1'b0;
    end else if (!run) begin
      count <= '0;
      down  <= 1'b0;
    end else if (tick) begin
      if (!down) begin
        count <= count + 1'b1;
        if (count == CNT_W'(PEAK - 1)) down <= 1'b1;
      end else begin
        count <= count - 1'b1;
        if (count == CNT_W'(1)) down <= 1'b0;
      end
    end
  end

  a_count_in_range: assert property (@(posedge clk) disable iff (!rst_n) count <= CNT_W'(PEAK))
    else $error("carrier beyond its peak");

  assign period_load = !run || (tick && down && count == CNT_W'(1));

endmodule
