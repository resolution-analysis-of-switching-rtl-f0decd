// End-to-end testbench of boost_hil_top at its default parameters: a PFC
// boost converter (L = 5 mH, C = 100 uF, 230 V rms 50 Hz mains, 400 V output,
// 300 W current-sink load) with 24-bit current and 32-bit voltage registers.
//
// The testbench loads one half mains period of open-loop duty cycles (1000
// words) into the sequencer, presets the output capacitor to 400 V and runs
// the model for SIM_PERIODS switching periods. Each step it drives the
// rectified mains voltage and the load current computed from the model's own
// output voltage, and steps a double-precision reference converter with the
// same switch signal. It checks:
//  - every period closes the switch for exactly the duty word fetched in the
//    period before, and the sequencer address follows and wraps;
//  - the mean absolute error of the model's input current and output voltage
//    against the reference stays below 2 % (of the mean reference magnitude),
//    the accuracy these register widths are chosen for;
//  - each mechanism occurred: closed switch, CCM, DCM, the diode clamp
//    (CCM ending in DCM), the sequence wrap, the memory load and the state
//    preset.
module boost_hil_top_tb;
  import boost_pkg::*;
  import boost_tb_pkg::*;

  localparam int  NI = 24, NV = 32, FI = NI - I_INT_BITS, FV = NV - V_INT_BITS;
  localparam int  PERIOD = 1000, DEPTH = 1000, DW = 10, AW = $clog2(DEPTH);
  localparam real L_H = 5.0e-3, C_F = 100.0e-6, DT = 10.0e-9;
  localparam real VRMS = 230.0, VO = 400.0, POUT = 300.0, FLINE = 50.0;
  localparam int  SIM_PERIODS = 14000;  // 140 ms, the evaluation length

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic mem_we = 1'b0;
  logic [AW-1:0] mem_waddr = '0, last_addr = AW'(DEPTH - 1);
  logic [DW-1:0] mem_wdata = '0;
  logic signed [NV:0] vin = '0, vout_load = '0, vout;
  logic signed [NI:0] ir = '0, iin_load = '0, iin;
  logic load = 1'b0;
  logic pwm, period_end, seq_wrap;
  boost_mode_e mode;
  logic [DW-1:0] duty;
  logic [AW-1:0] seq_addr;
  logic [$clog2(PERIOD)-1:0] pwm_step;

  int checks = 0, failures = 0;
  int words [DEPTH];

  always #5 clk = ~clk;

  boost_hil_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (SIM_PERIODS * PERIOD + 20 * DEPTH) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    real ri, rv, vg, t, di, sum_ei, sum_ri, sum_ev, sum_rv, pct_i, pct_v;
    int high, p, n_closed, n_ccm, n_dcm, n_clamp, n_wrap, n_load, n_write;
    int expected_duty;
    boost_mode_e prev_mode;

    n_closed = 0; n_ccm = 0; n_dcm = 0; n_clamp = 0; n_wrap = 0; n_load = 0; n_write = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // duty-cycle sequence: one half mains period
    for (int m = 0; m < DEPTH; m++) begin
      words[m]  = duty_word(m, PERIOD, DT, FLINE, VRMS, VO, POUT, L_H);
      mem_we    = 1'b1;
      mem_waddr = AW'(m);
      mem_wdata = DW'(words[m]);
      @(negedge clk);
      n_write++;
    end
    mem_we = 1'b0;

    // initial state: empty inductor, capacitor at the output voltage
    ri = 0.0;
    rv = VO;
    load      = 1'b1;
    iin_load  = '0;
    vout_load = (NV+1)'(to_fixed(VO, FV));
    @(negedge clk);
    load = 1'b0;
    n_load++;
    check(longint'(vout) == to_fixed(VO, FV) && iin == 0, "state preset");

    sum_ei = 0.0; sum_ri = 0.0; sum_ev = 0.0; sum_rv = 0.0;
    prev_mode = mode;
    run = 1'b1;
    for (p = 0; p < SIM_PERIODS; p++) begin
      high = 0;
      expected_duty = (p == 0) ? 0 : words[(p - 1) % DEPTH];
      check(int'(seq_addr) == (p % DEPTH), $sformatf("period %0d: address %0d", p, seq_addr));
      for (int k = 0; k < PERIOD; k++) begin
        // inputs for this step
        t  = (real'(p - 1) * real'(PERIOD) + real'(k)) * DT;
        vg = mains(t, VRMS, FLINE);
        vin = (NV+1)'(to_fixed(vg, FV));
        ir  = (NI+1)'(to_fixed(load_current(LOAD_CURRENT, to_real(longint'(vout), FV),
                                            POUT, VO), FI));
        // mechanisms
        if (pwm) begin
          high++;
          n_closed++;
        end
        if (mode == MODE_CCM) n_ccm++;
        if (mode == MODE_DCM) n_dcm++;
        if (prev_mode == MODE_CCM && mode == MODE_DCM) n_clamp++;
        prev_mode = mode;
        if (seq_wrap) n_wrap++;
        // reference step with the same switch signal
        ref_step(ri, rv, pwm, vg, load_current(LOAD_CURRENT, rv, POUT, VO),
                 DT / L_H, DT / C_F);
        @(negedge clk);
        di = to_real(longint'(iin), FI) - ri;
        sum_ei += (di < 0.0) ? -di : di;
        sum_ri += (ri < 0.0) ? -ri : ri;
        di = to_real(longint'(vout), FV) - rv;
        sum_ev += (di < 0.0) ? -di : di;
        sum_rv += (rv < 0.0) ? -rv : rv;
      end
      check(high == expected_duty,
            $sformatf("period %0d: %0d closed steps, expected %0d", p, high, expected_duty));
      check(int'(duty) == words[p % DEPTH],
            $sformatf("period %0d: duty %0d latched for next period", p, duty));
    end
    run = 1'b0;

    pct_i = 100.0 * sum_ei / sum_ri;
    pct_v = 100.0 * sum_ev / sum_rv;
    $display("mean abs error: current %.4f %%, voltage %.6f %%", pct_i, pct_v);
    $display("final state: model %.4f A %.3f V, reference %.4f A %.3f V",
             to_real(longint'(iin), FI), to_real(longint'(vout), FV), ri, rv);
    $display("steps: closed %0d, CCM %0d, DCM %0d; diode clamps %0d; wraps %0d",
             n_closed, n_ccm, n_dcm, n_clamp, n_wrap);
    check(pct_i < 2.0, "current error below 2 %");
    check(pct_v < 2.0, "voltage error below 2 %");
    check(n_closed > 0, "switch closed");
    check(n_ccm > 0, "CCM steps");
    check(n_dcm > 0, "DCM steps");
    check(n_clamp > 0, "diode clamp ends CCM");
    check(n_wrap == SIM_PERIODS / DEPTH, "sequence wraps once per half mains period");
    check(n_write == DEPTH, "sequence loaded");
    check(n_load == 1, "state preset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
