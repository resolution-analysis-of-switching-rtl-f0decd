// Testbench helpers for the boost converter model: conversions between real
// numbers and the fixed-point codes of the state registers, a floating-point
// reference model of the same converter, the load models and the open-loop
// duty-cycle sequence.
//
// The reference model uses double precision and the three switching cases of
// the ideal boost converter, with the diode blocking reverse current. Loads:
// a current sink draws P/Vo, a power sink draws P/v, a resistor R = Vo^2/P
// draws v/R. The duty cycle of switching period p of a half mains period is
//   d = 1 - (vg - L * dig/dt) / Vo,  vg = Vpk sin(wt), ig = Ipk sin(wt)
// evaluated at the middle of the period, so that the converter draws a
// sinusoidal current in phase with the mains (unity power factor) without a
// control loop.
package boost_tb_pkg;

  localparam real PI = 3.14159265358979323846;

  typedef enum int {LOAD_CURRENT = 0, LOAD_POWER = 1, LOAD_RESISTIVE = 2} load_e;

  // real -> two's-complement code with frac fraction bits (rounded)
  function automatic longint to_fixed(real x, int frac);
    return longint'(x * (2.0 ** frac));
  endfunction

  // code -> real
  function automatic real to_real(longint code, int frac);
    return real'(code) / (2.0 ** frac);
  endfunction

  // One forward-Euler step of the ideal boost converter.
  function automatic void ref_step(inout real i, inout real v, input bit q,
                                   input real vg, input real ir,
                                   input real dt_l, input real dt_c);
    real i_n;
    real v_n;
    if (q) begin
      i_n = i + dt_l * vg;
      v_n = v - dt_c * ir;
    end else if (i > 0.0) begin
      i_n = i + dt_l * (vg - v);
      v_n = v + dt_c * (i - ir);
      if (i_n < 0.0) i_n = 0.0;
    end else begin
      i_n = 0.0;
      v_n = v - dt_c * ir;
    end
    i = i_n;
    v = v_n;
  endfunction

  // Load current drawn at output voltage v.
  function automatic real load_current(int kind, real v, real p, real vo);
    case (kind)
      LOAD_CURRENT:   return p / vo;
      LOAD_POWER:     return (v > 1.0) ? p / v : p;
      default:        return v * p / (vo * vo);
    endcase
  endfunction

  // Rectified mains voltage at time t.
  function automatic real mains(real t, real vrms, real f_line);
    real s;
    s = $sin(2.0 * PI * f_line * t);
    return vrms * $sqrt(2.0) * ((s < 0.0) ? -s : s);
  endfunction

  // Duty word (closed steps out of period_steps) of switching period p.
  function automatic int duty_word(int p, int period_steps, real dt, real f_line,
                                   real vrms, real vo, real pout, real l_h);
    real t;
    real w;
    real vg;
    real dig;
    real d;
    t   = (real'(p) + 0.5) * real'(period_steps) * dt;
    w   = 2.0 * PI * f_line;
    vg  = vrms * $sqrt(2.0) * $sin(w * t);
    dig = (pout / vrms) * $sqrt(2.0) * w * $cos(w * t);
    d   = 1.0 - (vg - l_h * dig) / vo;
    if (d < 0.0) d = 0.0;
    if (d > 1.0) d = 1.0;
    return int'(d * real'(period_steps));
  endfunction

endpackage
