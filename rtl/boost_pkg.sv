// Shared types and constants of the fixed-point boost converter model.
//
// State variables are two's-complement fixed-point numbers. A current
// register of NI magnitude bits holds NI+1 bits in all: a sign, I_INT_BITS
// integer bits (currents up to 8 A) and NI-I_INT_BITS fraction bits. A voltage
// register of NV magnitude bits likewise holds a sign, V_INT_BITS integer bits
// (voltages up to 1024 V, covering the 1000 V design maximum) and NV-V_INT_BITS
// fraction bits. The 8 A and 1000 V ranges are the design maxima of the
// resolution analysis; splitting them into integer bits is this design's choice.
//
// The constants dt/L and dt/C of the Euler update are turned into integer
// multiplier coefficients of KW bits at elaboration time: coefficient =
// round(k * 2^s), with the shift s chosen so that the coefficient fills KW-1
// bits (it is positive, so the sign bit of a KW-bit signed operand stays 0).
// KW = 18 matches the 18x18 hardware multipliers of the target FPGA.
package boost_pkg;

  // Integer bits of the two kinds of state variable (sign bit not counted).
  localparam int I_INT_BITS = 3;   // |i| < 8 A
  localparam int V_INT_BITS = 10;  // |v| < 1024 V

  // Width of the multiplier coefficients, sign bit included.
  localparam int KW = 18;

  // Operating mode of the converter during one time step.
  typedef enum logic [1:0] {
    MODE_CLOSED = 2'd0,  // switch Q closed, eq. (1)
    MODE_CCM    = 2'd1,  // switch open, diode conducting, eq. (2)
    MODE_DCM    = 2'd2   // switch open, inductor current zero, eq. (3)
  } boost_mode_e;

  // Shift s such that k * 2^s lies in [2^(kw-2), 2^(kw-1)). k must be > 0.
  function automatic int coef_shift(real k, int kw);
    real lo;
    real hi;
    real x;
    int  s;
    lo = 2.0 ** (kw - 2);
    hi = 2.0 ** (kw - 1);
    x  = k;
    s  = 0;
    while (x < lo) begin
      x = x * 2.0;
      s = s + 1;
    end
    while (x >= hi) begin
      x = x / 2.0;
      s = s - 1;
    end
    return s;
  endfunction

  // Coefficient round(k * 2^s), kept below 2^(kw-1).
  function automatic longint coef_value(real k, int s, int kw);
    longint c;
    c = longint'(k * (2.0 ** s));
    if (c >= (longint'(1) <<< (kw - 1))) c = (longint'(1) <<< (kw - 1)) - 1;
    return c;
  endfunction

endpackage
