// Workload testbench: the four converter scenarios of the resolution study,
// each with a current-sink, a power-sink and a resistive load, at the
// default register widths (24-bit current, 32-bit voltage), for 140 ms of
// emulated time each (14 million steps).
//
//   scenario  L      C       Vin rms  Vout   Pout
//   1         5 mH   100 uF  230 V    400 V  300 W
//   2         1 mH   100 uF  230 V    400 V  300 W
//   3         1 mH   100 uF  110 V    300 V  150 W
//   4         1 mH   470 uF  230 V    400 V  300 W
//
// These widths are the largest of the combinations that keep the mean
// absolute error of every scenario and load below 2 %. Each configuration is
// also run with 40-bit current and 47-bit voltage registers, where rounding
// is negligible: the open-loop ideal converter with 1 mH and 100 uF
// (scenario 2) has no damping and its diode clamp makes it sensitive to any
// difference from the reference, so that even the widest model drifts from
// the double-precision run by a few percent. The check is therefore that the
// 24/32-bit registers add less than 2 percentage points of error to what the
// 40/47-bit model shows, in current and in voltage, and that the PWM closed
// the switch for exactly the sequenced duty in every period.
module boost_scenarios_tb;

  localparam int SIM_PERIODS = 14000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam real SL [4] = '{5.0e-3, 1.0e-3, 1.0e-3, 1.0e-3};
  localparam real SC [4] = '{100.0e-6, 100.0e-6, 100.0e-6, 470.0e-6};
  localparam real SVI[4] = '{230.0, 230.0, 110.0, 230.0};
  localparam real SVO[4] = '{400.0, 400.0, 300.0, 400.0};
  localparam real SP [4] = '{300.0, 300.0, 150.0, 300.0};

  localparam int WNI [2] = '{24, 40};
  localparam int WNV [2] = '{32, 47};

  logic done [2][4][3];
  real  pct_i [2][4][3];
  real  pct_v [2][4][3];
  int   bad [2][4][3];
  int   dcm [2][4][3];

  for (genvar w = 0; w < 2; w++) begin : g_w
    for (genvar s = 0; s < 4; s++) begin : g_s
      for (genvar l = 0; l < 3; l++) begin : g_l
        boost_scenario_run #(
          .NI(WNI[w]), .NV(WNV[w]), .L_H(SL[s]), .C_F(SC[s]), .VRMS(SVI[s]), .VO(SVO[s]),
          .POUT(SP[s]), .FLINE(50.0), .LOAD(l), .SIM_PERIODS(SIM_PERIODS)
        ) u_run (
          .clk, .rst_n, .done(done[w][s][l]), .pct_i(pct_i[w][s][l]), .pct_v(pct_v[w][s][l]),
          .bad_periods(bad[w][s][l]), .n_dcm(dcm[w][s][l]));
      end
    end
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
    for (int w = 0; w < 2; w++)
      for (int s = 0; s < 4; s++)
        for (int l = 0; l < 3; l++)
          if (!done[w][s][l]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin : main
    static string lname [3] = '{"current", "power", "resistive"};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(negedge clk);
    @(negedge clk);
    for (int s = 0; s < 4; s++) begin
      for (int l = 0; l < 3; l++) begin
        $display("scenario %0d %-9s load: 24/32 bits: current %.4f %%, voltage %.6f %%; 40/47 bits: current %.4f %%, voltage %.6f %%",
                 s + 1, lname[l], pct_i[0][s][l], pct_v[0][s][l], pct_i[1][s][l], pct_v[1][s][l]);
        check(pct_i[0][s][l] < pct_i[1][s][l] + 2.0, $sformatf("scenario %0d load %0d current error", s + 1, l));
        check(pct_v[0][s][l] < pct_v[1][s][l] + 2.0, $sformatf("scenario %0d load %0d voltage error", s + 1, l));
        check(bad[0][s][l] == 0 && bad[1][s][l] == 0, $sformatf("scenario %0d load %0d duty per period", s + 1, l));
        check(dcm[0][s][l] > 0, $sformatf("scenario %0d load %0d reaches DCM", s + 1, l));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
