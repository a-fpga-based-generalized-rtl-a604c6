// clk_divider: the divide-by-n counter that scales the input clock for the
// PWM core (selector SPD) and for the dead-time controller (selector SDP).
//
// The published design divides the input clock F by 2, 4, ... 256 according
// to a 3-bit selector. Here the divided clock is not a real clock but a
// one-cycle clock-enable pulse, `tick`, issued once every 2^(sel+1) input
// clocks, so that the whole modulator runs in a single clock domain (this
// implementation's choice). While `clr` is high the divider is held at zero
// and issues no tick; the first tick after `clr` falls comes 2^(sel+1)
// clocks later. A change of `sel` takes effect at once; if the count is
// already past the new end value it wraps through its full 8-bit range
// before ticking again.
module clk_divider #(
  parameter int unsigned SEL_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic [SEL_W-1:0] sel,   // divide ratio 2^(sel+1)
  output logic             tick
);
  localparam int unsigned DIV_W = (1 << SEL_W);   // 8 bits cover /256

  logic [DIV_W-1:0] cnt;
  logic [DIV_W-1:0] last;

  // end value of the count: 2^(sel+1) - 1
  always_comb last = DIV_W'((1 << (sel + 1)) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (clr)        cnt <= '0;
    else if (cnt == last) cnt <= '0;
    else                 cnt <= cnt + 1'b1;
  end

  assign tick = !clr && (cnt == last);

endmodule
