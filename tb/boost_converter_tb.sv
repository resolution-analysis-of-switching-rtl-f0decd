// Self-checking testbench of boost_converter.
//
// Two instances: one at the default widths (24-bit current, 32-bit voltage)
// and a narrow one (16 bits each). Checks, each against values computed here
// in floating point:
//  - one step in each of the three modes (closed, CCM, DCM) changes the state
//    by dt/L*... and dt/C*... to within one LSB, and the mode output is right;
//  - the diode clamp: an open-switch step that would reverse the current
//    leaves it at zero;
//  - an increment below half an LSB is lost in the narrow instance but kept
//    in the wide one (the resolution effect);
//  - saturation at the top of the current range, no wrap-around;
//  - 20000 steps under a PWM pattern track a double-precision reference.
// One step is taken per clock, so each check also confirms the one-cycle
// latency of the state update.
module boost_converter_tb;
  import boost_pkg::*;
  import boost_tb_pkg::*;

  localparam int  NI = 24, NV = 32, FI = NI - I_INT_BITS, FV = NV - V_INT_BITS;
  localparam int  SNI = 16, SNV = 16, SFI = SNI - I_INT_BITS, SFV = SNV - V_INT_BITS;
  localparam real L_H = 5.0e-3, C_F = 100.0e-6, DT = 10.0e-9;
  localparam real DT_L = DT / L_H, DT_C = DT / C_F;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic step_en = 1'b0, q = 1'b0, load = 1'b0;
  logic signed [NV:0] vin = '0, vout_load = '0, vout;
  logic signed [NI:0] ir = '0, iin_load = '0, iin;
  boost_mode_e mode;

  logic signed [SNV:0] s_vin = '0, s_vout_load = '0, s_vout;
  logic signed [SNI:0] s_ir = '0, s_iin_load = '0, s_iin;
  boost_mode_e s_mode;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  boost_converter #(.NI(NI), .NV(NV), .L_H(L_H), .C_F(C_F), .DT_S(DT)) dut (
    .clk, .rst_n, .step_en, .q, .vin, .ir, .load, .iin_load, .vout_load,
    .iin, .vout, .mode);

  boost_converter #(.NI(SNI), .NV(SNV), .L_H(L_H), .C_F(C_F), .DT_S(DT)) dut_s (
    .clk, .rst_n, .step_en, .q, .vin(s_vin), .ir(s_ir), .load,
    .iin_load(s_iin_load), .vout_load(s_vout_load),
    .iin(s_iin), .vout(s_vout), .mode(s_mode));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // Preset both instances with state (i, v) and inputs (vg, r).
  task automatic preset(real i, real v, real vg, real r);
    @(negedge clk);
    load       = 1'b1;
    step_en    = 1'b0;
    iin_load   = (NI+1)'(to_fixed(i, FI));
    vout_load  = (NV+1)'(to_fixed(v, FV));
    s_iin_load = (SNI+1)'(to_fixed(i, SFI));
    s_vout_load= (SNV+1)'(to_fixed(v, SFV));
    vin   = (NV+1)'(to_fixed(vg, FV));
    s_vin = (SNV+1)'(to_fixed(vg, SFV));
    ir    = (NI+1)'(to_fixed(r, FI));
    s_ir  = (SNI+1)'(to_fixed(r, SFI));
    @(negedge clk);
    load = 1'b0;
  endtask

  // One step of the wide instance, checked against the real-valued update.
  task automatic one_step(real i, real v, real vg, real r, bit sw,
                          boost_mode_e exp_mode, string name);
    real ei, ev, gi, gv;
    preset(i, v, vg, r);
    q = sw;
    #1;
    check(mode == exp_mode, {name, ": mode"});
    ei = i; ev = v;
    ref_step(ei, ev, sw, to_real(longint'(vin), FV), to_real(longint'(ir), FI), DT_L, DT_C);
    step_en = 1'b1;
    @(negedge clk);
    step_en = 1'b0;
    gi = to_real(longint'(iin), FI);
    gv = to_real(longint'(vout), FV);
    check(absr(gi - ei) <= 1.01 * (2.0 ** -FI), $sformatf("%s: iin %g expected %g", name, gi, ei));
    check(absr(gv - ev) <= 1.01 * (2.0 ** -FV), $sformatf("%s: vout %g expected %g", name, gv, ev));
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    real ri, rv, vg, r, err_i, err_v;
    longint i_before;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(iin == 0 && vout == 0, "reset clears state");

    // ---- single steps in each mode
    one_step(1.0, 400.0, 200.0, 0.75, 1'b1, MODE_CLOSED, "closed");
    one_step(1.0, 400.0, 200.0, 0.75, 1'b0, MODE_CCM, "ccm");
    one_step(0.0, 400.0, 200.0, 0.75, 1'b0, MODE_DCM, "dcm");
    one_step(1.5, 390.0, 300.0, 2.0, 1'b0, MODE_CCM, "ccm, ir > iin");

    // ---- diode clamp: 1e-4 A left, (vg - v) * dt/L = -4e-4 A in one step
    preset(1.0e-4, 400.0, 200.0, 0.75);
    q = 1'b0;
    step_en = 1'b1;
    @(negedge clk);
    step_en = 1'b0;
    check(iin == 0, "diode clamp holds current at zero");
    check(mode == MODE_DCM, "clamped current gives DCM");

    // ---- resolution: dt/L * 1 V = 2e-6 A, half an LSB of the narrow
    // instance is 2^-14 = 6.1e-5 A, while the wide instance resolves it
    preset(1.0, 400.0, 1.0, 0.75);
    q = 1'b1;
    i_before = longint'(s_iin);
    ri = to_real(longint'(iin), FI);
    step_en = 1'b1;
    repeat (10) @(negedge clk);
    step_en = 1'b0;
    check(longint'(s_iin) == i_before, "narrow instance loses sub-LSB increments");
    check(absr(to_real(longint'(iin), FI) - ri - 10.0 * DT_L * 1.0) < 4.0 * (2.0 ** -FI),
          "wide instance accumulates sub-LSB-of-narrow increments");

    // ---- saturation: 1000 V on a closed switch, 2e-3 A per step,
    // 500 steps from 7 A reach the 8 A end of the current range
    preset(7.0, 400.0, 1000.0, 0.0);
    q = 1'b1;
    step_en = 1'b1;
    repeat (1000) @(negedge clk);
    step_en = 1'b0;
    check(s_iin == (SNI+1)'((longint'(1) <<< SNI) - 1), "narrow current saturates at its maximum");
    check(s_iin > 0, "no wrap-around to negative");

    // ---- long run against the reference: 20 PWM periods of 1000 steps
    ri = 0.5; rv = 380.0;
    preset(ri, rv, 0.0, 0.0);
    err_i = 0.0; err_v = 0.0;
    for (int k = 0; k < 20000; k++) begin
      vg = 150.0 + 100.0 * $sin(real'(k) * 1.0e-4);
      r  = load_current(LOAD_POWER, rv, 300.0, 400.0);
      q  = ((k % 1000) < 550);
      vin = (NV+1)'(to_fixed(vg, FV));
      ir  = (NI+1)'(to_fixed(load_current(LOAD_POWER, to_real(longint'(vout), FV), 300.0, 400.0), FI));
      ref_step(ri, rv, q, vg, r, DT_L, DT_C);
      step_en = 1'b1;
      @(negedge clk);
      if (absr(to_real(longint'(iin), FI) - ri) > err_i) err_i = absr(to_real(longint'(iin), FI) - ri);
      if (absr(to_real(longint'(vout), FV) - rv) > err_v) err_v = absr(to_real(longint'(vout), FV) - rv);
    end
    step_en = 1'b0;
    $display("long run: max |i error| %g A, max |v error| %g V", err_i, err_v);
    check(err_i < 1.0e-3, "long run current tracks reference");
    check(err_v < 1.0e-3, "long run voltage tracks reference");

    // ---- step_en low holds the state
    i_before = longint'(iin);
    repeat (5) @(negedge clk);
    check(longint'(iin) == i_before, "state holds without step_en");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
