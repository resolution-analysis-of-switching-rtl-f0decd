// Runs one converter configuration of the resolution study and measures its
// accuracy; used by the scenario and resolution testbenches.
//
// Instantiates boost_hil_top at the register widths NI, NV and the component
// values L_H, C_F, loads the open-loop duty-cycle sequence of one half mains
// period, presets the output to VO and runs SIM_PERIODS switching periods.
// Each step it drives the rectified mains voltage and the load current of
// the chosen load type (0 current sink, 1 power sink, 2 resistor) from the
// model's own output voltage, steps a double-precision reference converter
// with the same switch signal and the same kind of load on its own output
// voltage, and accumulates the absolute errors. When done rises, pct_i and
// pct_v hold the mean absolute errors of input current and output voltage in
// percent of the mean reference magnitudes, and bad_periods counts periods
// whose closed-switch steps differ from their duty word.
module boost_scenario_run #(
  parameter int  NI          = 24,
  parameter int  NV          = 32,
  parameter real L_H         = 5.0e-3,
  parameter real C_F         = 100.0e-6,
  parameter real VRMS        = 230.0,
  parameter real VO          = 400.0,
  parameter real POUT        = 300.0,
  parameter real FLINE       = 50.0,
  parameter int  LOAD        = 0,
  parameter int  SIM_PERIODS = 14000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output real  pct_i,
  output real  pct_v,
  output int   bad_periods,
  output int   n_dcm
);

  import boost_pkg::*;
  import boost_tb_pkg::*;

  localparam int  FI = NI - I_INT_BITS, FV = NV - V_INT_BITS;
  localparam int  PERIOD = 1000, DEPTH = 1000, DW = 10, AW = $clog2(DEPTH);
  localparam real DT = 10.0e-9;
  localparam int  SEQ_LEN = int'(1.0 / (2.0 * FLINE) / (real'(PERIOD) * DT));

  logic run, mem_we, load;
  logic [AW-1:0] mem_waddr;
  logic [DW-1:0] mem_wdata;
  logic signed [NV:0] vin, vout_load, vout;
  logic signed [NI:0] ir, iin_load, iin;
  logic pwm, period_end, seq_wrap;
  boost_mode_e mode;
  logic [DW-1:0] duty;
  logic [AW-1:0] seq_addr;
  logic [$clog2(PERIOD)-1:0] pwm_step;
  wire  [AW-1:0] last_addr = AW'(SEQ_LEN - 1);

  boost_hil_top #(.NI(NI), .NV(NV), .L_H(L_H), .C_F(C_F)) u_top (.*);

  int  phase, cnt, p, high, expected;
  real ri, rv, vg, d, sum_ei, sum_ri, sum_ev, sum_rv;
  int  words [DEPTH];

  always @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 0; cnt <= 0; done <= 1'b0; run <= 1'b0; mem_we <= 1'b0; load <= 1'b0;
      mem_waddr <= '0; mem_wdata <= '0; vin <= '0; ir <= '0;
      iin_load <= '0; vout_load <= '0;
      bad_periods <= 0; n_dcm <= 0; pct_i <= 0.0; pct_v <= 0.0;
    end else begin
      case (phase)
        0: begin  // write the sequence
          words[cnt] = duty_word(cnt, PERIOD, DT, FLINE, VRMS, VO, POUT, L_H);
          mem_we    <= 1'b1;
          mem_waddr <= AW'(cnt);
          mem_wdata <= DW'(words[cnt]);
          if (cnt == SEQ_LEN - 1) begin
            phase <= 1;
          end
          cnt <= cnt + 1;
        end
        1: begin  // preset the state
          mem_we    <= 1'b0;
          load      <= 1'b1;
          vout_load <= (NV+1)'(to_fixed(VO, FV));
          ri = 0.0; rv = VO;
          sum_ei = 0.0; sum_ri = 0.0; sum_ev = 0.0; sum_rv = 0.0;
          p = 0; cnt = 0; high = 0;
          phase <= 2;
        end
        2: begin  // run, one step per cycle
          load <= 1'b0;
          run  <= 1'b1;
          if (cnt > 0) begin  // state after the previous step
            d = to_real(longint'(iin), FI) - ri;
            sum_ei += (d < 0.0) ? -d : d;
            sum_ri += (ri < 0.0) ? -ri : ri;
            d = to_real(longint'(vout), FV) - rv;
            sum_ev += (d < 0.0) ? -d : d;
            sum_rv += (rv < 0.0) ? -rv : rv;
          end
          if (p == SIM_PERIODS) begin
            run   <= 1'b0;
            pct_i <= 100.0 * sum_ei / sum_ri;
            pct_v <= 100.0 * sum_ev / sum_rv;
            done  <= 1'b1;
            phase <= 3;
          end else begin
            vg = mains((real'(p - 1) * real'(PERIOD) + real'(cnt % PERIOD)) * DT, VRMS, FLINE);
            vin <= (NV+1)'(to_fixed(vg, FV));
            ir  <= (NI+1)'(to_fixed(load_current(LOAD, to_real(longint'(vout), FV),
                                                 POUT, VO), FI));
            if (pwm) high = high + 1;
            if (mode == MODE_DCM) n_dcm <= n_dcm + 1;
            ref_step(ri, rv, pwm, vg, load_current(LOAD, rv, POUT, VO), DT / L_H, DT / C_F);
            cnt = cnt + 1;
            if (cnt % PERIOD == 0) begin
              expected = (p == 0) ? 0 : words[(p - 1) % SEQ_LEN];
              if (high != expected) bad_periods <= bad_periods + 1;
              high = 0;
              p = p + 1;
            end
          end
        end
        default: ;
      endcase
    end
  end

endmodule
