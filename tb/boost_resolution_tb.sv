// Workload testbench: the resolution sweep. Scenario 1 (L = 5 mH,
// C = 100 uF, 230 V rms in, 400 V / 300 W out, current-sink load) is run for
// 140 ms of emulated time with the current register narrowed from 24 down to
// 16 bits (voltage register 32 bits), and with the voltage register narrowed
// from 32 down to 16 bits (current register 24 bits). The mean absolute errors
// against the double-precision reference are printed for every width.
//
// Checked: the wide model is accurate (below 2 %); the error grows as the
// current register is narrowed, so that the narrowest model is far worse
// than the widest; narrow voltage registers make the model unusable.
module boost_resolution_tb;

  localparam int SIM_PERIODS = 14000;
  localparam int NIW [7] = '{24, 22, 20, 19, 18, 17, 16};
  localparam int NVW [5] = '{32, 28, 24, 20, 16};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic di_done [7];
  real  di_pi [7];
  real  di_pv [7];
  int   di_bad [7];
  int   di_dcm [7];
  logic dv_done [5];
  real  dv_pi [5];
  real  dv_pv [5];
  int   dv_bad [5];
  int   dv_dcm [5];

  for (genvar n = 0; n < 7; n++) begin : g_ni
    boost_scenario_run #(.NI(NIW[n]), .NV(32), .SIM_PERIODS(SIM_PERIODS)) u_run (
      .clk, .rst_n, .done(di_done[n]), .pct_i(di_pi[n]), .pct_v(di_pv[n]),
      .bad_periods(di_bad[n]), .n_dcm(di_dcm[n]));
  end
  for (genvar n = 0; n < 5; n++) begin : g_nv
    boost_scenario_run #(.NI(24), .NV(NVW[n]), .SIM_PERIODS(SIM_PERIODS)) u_run (
      .clk, .rst_n, .done(dv_done[n]), .pct_i(dv_pi[n]), .pct_v(dv_pv[n]),
      .bad_periods(dv_bad[n]), .n_dcm(dv_dcm[n]));
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

  function automatic bit all_done();
    foreach (di_done[n]) if (!di_done[n]) return 1'b0;
    foreach (dv_done[n]) if (!dv_done[n]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin : main
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(negedge clk);
    @(negedge clk);
    foreach (NIW[n])
      $display("current %2d bits, voltage 32 bits: current error %9.4f %%, voltage error %9.6f %%",
               NIW[n], di_pi[n], di_pv[n]);
    foreach (NVW[n])
      $display("current 24 bits, voltage %2d bits: current error %9.4f %%, voltage error %9.6f %%",
               NVW[n], dv_pi[n], dv_pv[n]);
    check(di_pi[0] < 2.0 && di_pv[0] < 2.0, "24/32-bit model within 2 %");
    for (int n = 1; n < 7; n++)
      check(di_pi[n] >= 0.8 * di_pi[n-1],
            $sformatf("current error does not shrink when narrowing to %0d bits", NIW[n]));
    check(di_pi[6] > 5.0 && di_pi[6] > 10.0 * di_pi[0], "16-bit current register far less accurate");
    check(dv_pi[4] > 20.0, "16-bit voltage register unusable");
    foreach (NIW[n]) check(di_pi[n] > di_pv[n], "current error above voltage error");
    foreach (NVW[n]) check(dv_pi[n] > dv_pv[n], "current error above voltage error");
    foreach (NIW[n]) check(di_bad[n] == 0, "duty per period");
    foreach (NVW[n]) check(dv_bad[n] == 0, "duty per period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
