// Fixed-point model of an ideal boost converter for hardware-in-the-loop
// emulation.
//
// Every enabled clock cycle is one integration step of dt seconds (10 ns by
// default, one hundredth of a microsecond, so that one switching period of
// 100 kHz is 1000 steps). The two state variables, the inductor (input)
// current iin and the capacitor (output) voltage vout, are updated by forward
// Euler from their values of the previous step:
//
//   switch closed (q = 1):          iin += dt/L * vin          vout -= dt/C * ir
//   switch open, iin > 0 (CCM):     iin += dt/L * (vin - vout) vout += dt/C * (iin - ir)
//   switch open, iin <= 0 (DCM):    iin  = 0                   vout -= dt/C * ir
//
// These three cases and the choice between them are those of the design.
// The hardware holds exactly two multipliers, one per state variable: the
// inductor multiplier takes vin or vin - vout, the capacitor multiplier takes
// -ir or iin - ir, each times a constant coefficient of boost_pkg::KW bits.
// The product is rounded to the state register's LSB (round half up); an
// increment smaller than half an LSB is lost, which is exactly the resolution
// effect that the register widths NI and NV must be chosen against.
//
// Choices of this design, not given by the method it implements:
//  - the fixed-point formats (see boost_pkg) and round-half-up rounding;
//  - with the switch open, a current that would step below zero is set to
//    zero (the diode blocks reverse current), which starts DCM;
//  - both state registers saturate at the ends of their range instead of
//    wrapping;
//  - a synchronous load port presets both state variables (initial state).
//
// Interface: vin (rectified input voltage) and vout use the voltage format of
// NV+1 bits, ir (load current) and iin the current format of NI+1 bits. q is
// the switch signal from the PWM. mode tells which equation the step taken at
// the next enabled edge uses. Timing: iin and vout are registers; a step is
// taken at each rising clock edge with step_en high, using q, vin, ir and the
// state present before the edge. Reset (active low, asynchronous) clears both
// state variables; load has priority over step_en.
module boost_converter
  import boost_pkg::*;
#(
  parameter int  NI   = 24,        // magnitude bits of the current register
  parameter int  NV   = 32,        // magnitude bits of the voltage register
  parameter real L_H  = 5.0e-3,    // inductance, henry
  parameter real C_F  = 100.0e-6,  // capacitance, farad
  parameter real DT_S = 10.0e-9    // integration step, second
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               step_en,
  input  logic               q,
  input  logic signed [NV:0] vin,
  input  logic signed [NI:0] ir,
  input  logic               load,
  input  logic signed [NI:0] iin_load,
  input  logic signed [NV:0] vout_load,
  output logic signed [NI:0] iin,
  output logic signed [NV:0] vout,
  output boost_mode_e        mode
);

  localparam int FI = NI - I_INT_BITS;  // fraction bits of a current
  localparam int FV = NV - V_INT_BITS;  // fraction bits of a voltage

  // Increment in current LSBs per voltage LSB, and the reverse.
  localparam real    KL_REAL = DT_S / L_H * (2.0 ** (FI - FV));
  localparam real    KC_REAL = DT_S / C_F * (2.0 ** (FV - FI));
  localparam int     SL      = coef_shift(KL_REAL, KW);
  localparam int     SC      = coef_shift(KC_REAL, KW);
  localparam longint KL_INT  = coef_value(KL_REAL, SL, KW);
  localparam longint KC_INT  = coef_value(KC_REAL, SC, KW);
  localparam logic signed [KW-1:0] KL = KW'(KL_INT);
  localparam logic signed [KW-1:0] KC = KW'(KC_INT);

  // Working width for sums and shifted products; wide enough for any
  // product, shift and register of the supported sizes.
  localparam int WW = NI + NV + KW + 8;

  localparam logic signed [WW-1:0] I_MAX = (WW'(1) <<< NI) - WW'(1);
  localparam logic signed [WW-1:0] I_MIN = -(WW'(1) <<< NI);
  localparam logic signed [WW-1:0] V_MAX = (WW'(1) <<< NV) - WW'(1);
  localparam logic signed [WW-1:0] V_MIN = -(WW'(1) <<< NV);

  // ---------------------------------------------------------------- mode
  always_comb begin
    if (q)            mode = MODE_CLOSED;
    else if (iin > 0) mode = MODE_CCM;
    else              mode = MODE_DCM;
  end

  // ---------------------------------------------------------- multipliers
  logic signed [NV+1:0]    l_opnd;   // vin or vin - vout
  logic signed [NI+1:0]    c_opnd;   // -ir or iin - ir
  logic signed [NV+KW+1:0] l_prod;
  logic signed [NI+KW+1:0] c_prod;

  always_comb begin
    if (mode == MODE_CLOSED) l_opnd = (NV+2)'(vin);
    else                     l_opnd = (NV+2)'(vin) - (NV+2)'(vout);
    if (mode == MODE_CCM)    c_opnd = (NI+2)'(iin) - (NI+2)'(ir);
    else                     c_opnd = -(NI+2)'(ir);
    l_prod = l_opnd * KL;
    c_prod = c_opnd * KC;
  end

  // Round the products to the LSB of the state registers.
  logic signed [WW-1:0] di;
  logic signed [WW-1:0] dv;

  if (SL > 0) begin : g_l_shr
    localparam logic signed [WW-1:0] HALF = WW'(1) <<< (SL - 1);
    assign di = (WW'(l_prod) + HALF) >>> SL;
  end else begin : g_l_shl
    assign di = WW'(l_prod) <<< (-SL);
  end

  if (SC > 0) begin : g_c_shr
    localparam logic signed [WW-1:0] HALF = WW'(1) <<< (SC - 1);
    assign dv = (WW'(c_prod) + HALF) >>> SC;
  end else begin : g_c_shl
    assign dv = WW'(c_prod) <<< (-SC);
  end

  // ------------------------------------------------------------ next state
  logic signed [WW-1:0] i_sum;
  logic signed [WW-1:0] v_sum;
  logic signed [NI:0]   iin_next;
  logic signed [NV:0]   vout_next;

  always_comb begin
    i_sum = WW'(iin) + di;
    v_sum = WW'(vout) + dv;

    if (mode == MODE_DCM)      iin_next = '0;
    else if (i_sum > I_MAX)    iin_next = (NI+1)'(I_MAX);
    else if (i_sum < I_MIN)    iin_next = (NI+1)'(I_MIN);
    else                       iin_next = (NI+1)'(i_sum);
    // With the switch open the diode cannot carry a negative current.
    if (!q && iin_next < 0)    iin_next = '0;

    if (v_sum > V_MAX)         vout_next = (NV+1)'(V_MAX);
    else if (v_sum < V_MIN)    vout_next = (NV+1)'(V_MIN);
    else                       vout_next = (NV+1)'(v_sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iin  <= '0;
      vout <= '0;
    end else if (load) begin
      iin  <= iin_load;
      vout <= vout_load;
    end else if (step_en) begin
      iin  <= iin_next;
      vout <= vout_next;
    end
  end

  // With the switch open the model never leaves a negative current behind.
  a_no_reverse_current : assert property (
    @(posedge clk) disable iff (!rst_n) (step_en && !load && !q) |=> (iin >= 0));

  // Widths from 16 to 47 bits are supported; coefficients must not vanish.
  initial begin
    assert (NI >= 16 && NI <= 47 && NV >= 16 && NV <= 47)
      else $error("boost_converter: NI and NV must lie in 16..47");
    assert (KL_INT > 0 && KC_INT > 0)
      else $error("boost_converter: coefficient rounds to zero");
  end

endmodule
