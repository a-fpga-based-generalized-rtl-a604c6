// gpwm_pkg: shared types and constants of the generalized pulse width
// modulator.
//
// Number scale. One voltage level E of the inverter is worth HALF_PERIOD
// (500) counts, both for the reference voltages the host writes and for the
// triangular carrier, which runs 0 -> 500 -> 0 in one PWM period (1000
// carrier ticks). A leg reference of 500*K + f (0 <= f < 500) therefore means
// "output level K for (500 - f)/500 of the period and level K+1 for f/500".
// This scale, the 12-bit data width, the 5-level / 4-leg maximum and the
// control-register bit layout follow the published design. The register
// address map is this implementation's choice (the bus is only said to have a
// 3-bit address).
package gpwm_pkg;

  localparam int unsigned DATA_W      = 12;   // host data bus / register width
  localparam int unsigned ADDR_W      = 3;    // host address bus
  localparam int unsigned CNT_W       = 12;   // carrier counter width
  localparam int unsigned HALF_PERIOD = 500;  // carrier peak = counts per level
  localparam int unsigned MAX_LEVELS  = 5;    // N = 2 .. 5
  localparam int unsigned MAX_PAIRS   = MAX_LEVELS - 1; // switch pairs per leg
  localparam int unsigned N_LEGS      = 4;    // legs a, b, c and the fourth leg f
  localparam int unsigned DT_TICKS    = 40;   // dead-time counter end value
  localparam int unsigned TH_W        = 16;   // signed threshold width

  // leg indices
  localparam int unsigned LEG_A = 0;
  localparam int unsigned LEG_B = 1;
  localparam int unsigned LEG_C = 2;
  localparam int unsigned LEG_F = 3;

  // Control register, bit 11 down to bit 0.
  typedef struct packed {
    logic       reserved;   // bit 11
    logic [2:0] sdp;        // bits 10-8 : dead-time prescaler, F/2^(sdp+1)
    logic       handshake;  // bit 7     : 0 = references ready, 1 = being modified
    logic       run;        // bit 6     : 0 = PWM core held in reset
    logic       mode;       // bit 5     : 0 = three-leg centre-split, 1 = four-leg
    logic [2:0] spd;        // bits 4-2  : PWM core prescaler, F/2^(spd+1)
    logic [1:0] level;      // bits 1-0  : inverter level N = level + 2
  } ctrl_t;

  // Register addresses on the 3-bit host address bus.
  typedef enum logic [ADDR_W-1:0] {
    ADDR_REF_A = 3'd0,
    ADDR_REF_B = 3'd1,
    ADDR_REF_C = 3'd2,
    ADDR_CTRL  = 3'd3
  } addr_e;

  typedef logic [DATA_W-1:0]            ref_t;
  typedef ref_t [2:0]                   ref3_t;    // index LEG_A..LEG_C
  typedef logic signed [TH_W-1:0]       th_t;
  typedef th_t [N_LEGS-1:0][MAX_PAIRS-1:0] th_arr_t; // [leg][pair k-1]
  typedef logic [N_LEGS-1:0][MAX_PAIRS-1:0] pair_bits_t;
  // gate bit [leg][n-1] drives switch S_leg,n (n = 1 .. 2*MAX_PAIRS)
  typedef logic [N_LEGS-1:0][2*MAX_PAIRS-1:0] gate_t;

endpackage
