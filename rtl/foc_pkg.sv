// foc_pkg: number formats and shared arithmetic of the field oriented control (FOC) datapath.
//
// Every current, voltage and duty cycle travels as Fix_16_13: a 16-bit two's complement
// number with 13 fraction bits (range -4.0 .. +3.99988, step 1/8192), the format the
// transformation blocks of the reference design use. Angles are UFix_12_0: 4096 counts per
// full turn, so an angle wraps for free. Currents are in ampere; voltages are per unit of the
// DC-link voltage (1.0 = Vdc), which is the unit the space-vector modulator needs; duty cycles
// are 0.0 .. 1.0. The per-unit voltage scaling is a choice of this implementation.
//
// The package also fixes the pipeline latency of each block so the top level can align the
// sample strobe with the data, and provides saturating rounding helpers used by all blocks.
package foc_pkg;

  localparam int FIX_W    = 16;
  localparam int FIX_FRAC = 13;
  localparam int ANG_W    = 12;

  typedef logic signed [FIX_W-1:0] fix_t;
  typedef logic        [ANG_W-1:0] angle_t;

  localparam fix_t FIX_MAX = 16'sh7FFF;
  localparam fix_t FIX_MIN = 16'sh8000;
  localparam fix_t FIX_ONE = 16'sh2000;

  // Three-phase, stationary two-axis and rotating two-axis quantities.
  typedef struct packed { fix_t a; fix_t b; fix_t c; } abc_t;
  typedef struct packed { fix_t alpha; fix_t beta; } ab_t;
  typedef struct packed { fix_t d; fix_t q; } dq_t;

  // Pipeline latencies in clock cycles, input sample to registered output.
  localparam int LUT_LAT        = 2;
  localparam int CLARKE_LAT     = 5;
  localparam int PARK_LAT       = 5;
  localparam int INV_PARK_LAT   = 5;
  localparam int INV_CLARKE_LAT = 5;
  localparam int PI_LAT         = 2;
  localparam int FF_LAT         = 4;
  localparam int SVPWM_LAT      = 3;

  // Clamp a wide signed value to the Fix_16_13 range.
  function automatic fix_t sat_fix(input logic signed [63:0] v);
    if (v > 64'sd32767)       return FIX_MAX;
    else if (v < -64'sd32768) return FIX_MIN;
    else                      return fix_t'(v);
  endfunction

  // Round a wide signed value carrying SHIFT extra fraction bits (half up) and saturate.
  function automatic fix_t round_sat(input logic signed [63:0] v, input int shift);
    logic signed [63:0] r;
    r = (v + (64'sd1 <<< (shift - 1))) >>> shift;
    return sat_fix(r);
  endfunction

  // Fix_16_13 times Fix_16_13, rounded and saturated to Fix_16_13.
  function automatic fix_t mul_fix(input fix_t a, input fix_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return round_sat(p, FIX_FRAC);
  endfunction

  // Elaboration-time conversion of a real constant to a signed integer with FRAC fraction bits.
  function automatic longint real_to_q(input real r, input int frac);
    real s;
    s = r * (2.0 ** frac);
    return (s >= 0.0) ? longint'($rtoi(s + 0.5)) : -longint'($rtoi(-s + 0.5));
  endfunction

endpackage
