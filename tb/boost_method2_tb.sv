// Workload testbench: the analytical width rule and the widths it yields.
//
// Part 1 applies  width = ceil(log2(x / dx)) + n  with n = 8 to the four
// scenarios of the converter study, using 8 A and 1000 V as the largest
// values x. The smallest increment dx is taken from the ideal waveforms over
// one half mains period after discarding the 5 % of the time when it is
// nearest zero: dt/L * vg for the current (switch closed) and dt/C *
// (iin - iR) for the voltage (CCM). The widths are printed.
//
// Part 2 runs the model for 140 ms at the widths of the analytical rule as
// tabulated for the four scenarios, (26,36), (23,36), (25,34), (23,38), with
// a current-sink load, and the same configuration at 40/47 bits. The check
// is that the conservative widths add less than 2 percentage points of mean
// error to the 40/47-bit run, in current and in voltage, and that they are
// at least as accurate as the 24/32-bit default in scenario 1, where the
// open-loop run is well conditioned.
module boost_method2_tb;
  import boost_tb_pkg::*;

  localparam int SIM_PERIODS = 14000;
  localparam real SL [4] = '{5.0e-3, 1.0e-3, 1.0e-3, 1.0e-3};
  localparam real SC [4] = '{100.0e-6, 100.0e-6, 100.0e-6, 470.0e-6};
  localparam real SVI[4] = '{230.0, 230.0, 110.0, 230.0};
  localparam real SVO[4] = '{400.0, 400.0, 300.0, 400.0};
  localparam real SP [4] = '{300.0, 300.0, 150.0, 300.0};
  localparam int  TNI[4] = '{26, 23, 25, 23};
  localparam int  TNV[4] = '{36, 36, 34, 38};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [3][4];
  real  pct_i [3][4];
  real  pct_v [3][4];
  int   bad [3][4];
  int   dcm [3][4];

  for (genvar s = 0; s < 4; s++) begin : g_s
    boost_scenario_run #(
      .NI(TNI[s]), .NV(TNV[s]), .L_H(SL[s]), .C_F(SC[s]), .VRMS(SVI[s]), .VO(SVO[s]),
      .POUT(SP[s]), .LOAD(0), .SIM_PERIODS(SIM_PERIODS)
    ) u_m2 (.clk, .rst_n, .done(done[0][s]), .pct_i(pct_i[0][s]), .pct_v(pct_v[0][s]),
            .bad_periods(bad[0][s]), .n_dcm(dcm[0][s]));
    boost_scenario_run #(
      .NI(40), .NV(47), .L_H(SL[s]), .C_F(SC[s]), .VRMS(SVI[s]), .VO(SVO[s]),
      .POUT(SP[s]), .LOAD(0), .SIM_PERIODS(SIM_PERIODS)
    ) u_wide (.clk, .rst_n, .done(done[1][s]), .pct_i(pct_i[1][s]), .pct_v(pct_v[1][s]),
              .bad_periods(bad[1][s]), .n_dcm(dcm[1][s]));
  end
  boost_scenario_run #(.NI(24), .NV(32), .LOAD(0), .SIM_PERIODS(SIM_PERIODS)) u_default (
    .clk, .rst_n, .done(done[2][0]), .pct_i(pct_i[2][0]), .pct_v(pct_v[2][0]),
    .bad_periods(bad[2][0]), .n_dcm(dcm[2][0]));
  for (genvar s = 1; s < 4; s++) begin : g_unused
    assign done[2][s] = 1'b1;
    assign pct_i[2][s] = 0.0;
    assign pct_v[2][s] = 0.0;
    assign bad[2][s] = 0;
    assign dcm[2][s] = 0;
  end

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (SIM_PERIODS * 1000 + 5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Level below which the rectified mains voltage stays for a fraction frac
  // of a half period: |vpk sin| < level for 2/pi * asin(level/vpk) of the time.
  function automatic real percentile_vg(real vpk, real frac);
    return vpk * $sin(frac * PI / 2.0);
  endfunction

  // Level below which |ipk sin - ir| stays for a fraction frac of a half
  // period, by bisection on the level over a sampled half period.
  function automatic real percentile_diff(real ipk, real ir, real frac);
    real lo, hi, mid, f;
    lo = 0.0;
    hi = ipk;
    for (int it = 0; it < 60; it++) begin
      mid = 0.5 * (lo + hi);
      // time fraction where |ipk sin(theta) - ir| < mid, theta in [0, pi]
      f = 0.0;
      for (int k = 0; k < 20000; k++) begin
        real d;
        d = ipk * $sin(PI * (real'(k) + 0.5) / 20000.0) - ir;
        if (((d < 0.0) ? -d : d) < mid) f += 1.0;
      end
      f = f / 20000.0;
      if (f < frac) lo = mid; else hi = mid;
    end
    return 0.5 * (lo + hi);
  endfunction

  function automatic bit all_done();
    for (int w = 0; w < 3; w++)
      for (int s = 0; s < 4; s++)
        if (!done[w][s]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin : main
    real vmin, dmin, di, dv;
    int  wi, wv;
    for (int s = 0; s < 4; s++) begin
      vmin = percentile_vg(SVI[s] * $sqrt(2.0), 0.05);
      dmin = percentile_diff(SP[s] / SVI[s] * $sqrt(2.0), SP[s] / SVO[s], 0.05);
      di = 10.0e-9 / SL[s] * vmin;
      dv = 10.0e-9 / SC[s] * dmin;
      wi = $clog2(longint'($floor(8.0 / di)) + 1) + 8;
      wv = $clog2(longint'($floor(1000.0 / dv)) + 1) + 8;
      $display("scenario %0d: min vg %.2f V -> di %.3g A; min |iin - iR| %.4f A -> dv %.3g V; widths (%0d, %0d), tabulated (%0d, %0d)",
               s + 1, vmin, di, dmin, dv, wi, wv, TNI[s], TNV[s]);
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(negedge clk);
    @(negedge clk);
    for (int s = 0; s < 4; s++) begin
      $display("scenario %0d at (%0d, %0d): current %.4f %%, voltage %.6f %%; at (40, 47): current %.4f %%, voltage %.6f %%",
               s + 1, TNI[s], TNV[s], pct_i[0][s], pct_v[0][s], pct_i[1][s], pct_v[1][s]);
      check(pct_i[0][s] < pct_i[1][s] + 2.0, $sformatf("scenario %0d current error", s + 1));
      check(pct_v[0][s] < pct_v[1][s] + 2.0, $sformatf("scenario %0d voltage error", s + 1));
      check(bad[0][s] == 0 && bad[1][s] == 0, $sformatf("scenario %0d duty per period", s + 1));
    end
    $display("scenario 1 at (24, 32): current %.4f %%, voltage %.6f %%", pct_i[2][0], pct_v[2][0]);
    check(pct_i[0][0] <= pct_i[2][0] && pct_v[0][0] <= pct_v[2][0],
          "conservative widths at least as accurate as the default in scenario 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
