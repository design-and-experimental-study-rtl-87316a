// svpwm_pkg: types and fixed-point constants shared by the three-level SVPWM
// signal generator.
//
// Voltage scale: a reference component is a signed REF_W-bit number in which
// one third of the DC-link voltage (the length of a short vector, Ud/3) is
// 2**UNIT_SHIFT. The long vector (2Ud/3) is then 2*UNIT and the middle vector
// (sqrt(3)Ud/3) is sqrt(3)*UNIT. Trigonometric constants are Q14 fixed point.
// This scaling is a choice of this design; the inverter model it follows is
// V = (Ud/3)(Sa + Sb e^{j2pi/3} + Sc e^{-j2pi/3}) with Sx in {-1, 0, +1}.
package svpwm_pkg;

  localparam int REF_W      = 16;          // width of U-alpha / U-beta
  localparam int UNIT_SHIFT = 13;          // Ud/3 == 1 << UNIT_SHIFT
  localparam int UNIT       = 1 << UNIT_SHIFT;
  localparam int TIME_W     = 16;          // width of counter values and times
  localparam int NUM_PHASES = 3;
  localparam int NUM_PWM    = 12;          // 4 IGBTs per phase leg

  // Q14 constants
  localparam int Q14             = 14;
  localparam int K_SQRT3_Q14     = 28378;  // sqrt(3)
  localparam int K_SQRT3_2_Q14   = 14189;  // sqrt(3)/2
  localparam int K_HALF_Q14      = 8192;   // 1/2
  localparam int K_INV_SQRT3_Q14 = 9459;   // 1/sqrt(3)
  localparam int K_2_SQRT3_Q14   = 18919;  // 2/sqrt(3)

  // Output level of one phase leg: N (-Ud/2), O (neutral point), P (+Ud/2)
  typedef enum logic [1:0] {
    LV_N = 2'd0,
    LV_O = 2'd1,
    LV_P = 2'd2
  } level_t;

  // Switching state of the three legs, e.g. PON = '{a:LV_P, b:LV_O, c:LV_N}
  typedef struct packed {
    level_t a;
    level_t b;
    level_t c;
  } sw_state_t;

  // 60-degree sector I..VI, coded 1..6
  typedef logic [2:0] sector_t;
  // small region 1..6 inside a sector (document's improved division)
  typedef logic [2:0] region_t;

  typedef logic [TIME_W-1:0] time_t;
  typedef logic signed [REF_W-1:0] ref_t;

  // Per-phase comparator thresholds, in carrier-counter units: the leg is at
  // O or above while cnt >= no, and at P while cnt >= op. A value above the
  // carrier peak never matches.
  typedef struct packed {
    time_t no;
    time_t op;
  } phase_cmp_t;

  // Negate a level (P <-> N), used when a state is rotated by an odd multiple
  // of 60 degrees.
  function automatic level_t lv_neg(level_t l);
    case (l)
      LV_P:    return LV_N;
      LV_N:    return LV_P;
      default: return LV_O;
    endcase
  endfunction

endpackage
