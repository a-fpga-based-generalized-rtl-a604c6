// data_buffer: host interface of the modulator.
//
// A host processor writes the phase reference voltages of legs a, b and c
// and the 12-bit control register over a 12-bit data bus and a 3-bit address
// bus (widths and control-bit layout as published; see gpwm_pkg::ctrl_t).
// References are fixed-point numbers on the 500-counts-per-level scale,
// already shifted by 250*(N-1) so that they are referred to the bottom of
// the dc bus, i.e. 0 .. 500*(N-1).
//
// The module keeps two copies of the references. The host copy is written
// whenever `wr` is high at a clock edge. The working copy, together with the
// Level and Mode fields it must be interpreted with, is what the PWM core
// uses; it is refreshed from the host copy on `period_load` (the start of a
// PWM period, or any cycle while the core is held in reset) only while the
// Handshaking bit is 0 ("references ready"). A host sets the bit, writes the
// three references and clears it, so that a period never mixes old and new
// data. The double copy and the period-boundary update are this
// implementation's reading of the Handshaking bit.
//
// Interface: synchronous single-cycle writes (`wr`, `addr`, `din`);
// combinational reads (`addr` -> `dout`) of the host copy, unused addresses
// read 0. Control fields other than Level and Mode act as soon as written.
module data_buffer
  import gpwm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host bus
  input  logic              wr,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout,
  // from the PWM core
  input  logic              period_load,
  // to the PWM core and dead-time controller
  output ctrl_t             ctrl,
  output ref3_t             ref_act,
  output logic [1:0]        level_act,
  output logic              mode_act
);
  ref3_t ref_host;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_host <= '0;
      ctrl     <= '0;
    end else if (wr) begin
      unique case (addr)
        ADDR_REF_A: ref_host[LEG_A] <= din;
        ADDR_REF_B: ref_host[LEG_B] <= din;
        ADDR_REF_C: ref_host[LEG_C] <= din;
        ADDR_CTRL:  ctrl            <= ctrl_t'(din);
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_act   <= '0;
      level_act <= '0;
      mode_act  <= 1'b0;
    end else if (period_load && !ctrl.handshake) begin
      ref_act   <= ref_host;
      level_act <= ctrl.level;
      mode_act  <= ctrl.mode;
    end
  end

  always_comb begin
    unique case (addr)
      ADDR_REF_A: dout = ref_host[LEG_A];
      ADDR_REF_B: dout = ref_host[LEG_B];
      ADDR_REF_C: dout = ref_host[LEG_C];
      ADDR_CTRL:  dout = DATA_W'(ctrl);
      default:    dout = '0;
    endcase
  end

endmodule
