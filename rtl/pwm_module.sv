// PWM generator driving the switch of the converter model.
//
// A switching period is PERIOD integration steps (1000 steps of 10 ns give
// 100 kHz, so the PWM resolution equals the integration step). A step counter
// runs from 0 to PERIOD-1 on every enabled cycle; the output is high while the
// counter is below the duty value, so a duty value D closes the switch for
// exactly D steps of the period (D >= PERIOD keeps it closed all period).
// The 10-bit duty input and the 1000-step period follow the design; the
// counter-compare structure and the shadow register are this design's choice.
//
// Timing: the duty input is sampled into a shadow register on the last step
// of a period (period_end high), so a new value applies from the first step
// of the next period and never changes a period already running. After reset
// the shadow register holds 0: the first period keeps the switch open.
// pwm, period_end and step are combinational from registers and en.
module pwm_module #(
  parameter int PERIOD = 1000,  // integration steps per switching period
  parameter int DW     = 10     // duty-cycle width
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,          // one step per enabled cycle
  input  logic [DW-1:0]              duty,        // closed steps per period
  output logic                       pwm,         // switch Q closed when high
  output logic                       period_end,  // last step of a period
  output logic [$clog2(PERIOD)-1:0]  step,        // step within the period
  output logic [DW-1:0]              duty_q       // duty of the running period
);

  localparam int CW = $clog2(PERIOD);
  localparam int XW = (DW > CW) ? DW : CW;
  localparam logic [CW-1:0] LAST = CW'(PERIOD - 1);

  logic [CW-1:0] cnt;

  assign step       = cnt;
  assign period_end = en && (cnt == LAST);
  assign pwm        = XW'(cnt) < XW'(duty_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      duty_q <= '0;
    end else if (en) begin
      if (cnt == LAST) begin
        cnt    <= '0;
        duty_q <= duty;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  a_cnt_range : assert property (@(posedge clk) disable iff (!rst_n) cnt <= LAST);

endmodule
