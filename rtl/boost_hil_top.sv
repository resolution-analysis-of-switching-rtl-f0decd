// Converter model for hardware-in-the-loop emulation of a PFC boost stage,
// together with its open-loop duty-cycle sequencer.
//
// Data path: seq_address steps through duty_cycle_mem one word per switching
// period; the word read becomes the duty cycle of pwm_module, whose output is
// the switch signal of boost_converter. While run is high, every clock cycle
// is one integration step: the PWM counter advances and the converter model
// updates its input current and output voltage. The rectified input voltage
// vin and the load current ir are inputs, in the fixed-point formats of
// boost_pkg (a host or testbench computes them, a current sink, a power sink
// or a resistor being modelled by how ir follows vout).
//
// Timing: the duty word for a period is fetched during the period before it
// and latched by the PWM on the last step of that period; the first period
// after reset therefore keeps the switch open and the first word of the
// memory applies from the second period. The memory can be written at any
// time; a word written during a period that has already fetched it applies
// the next time the sequence reaches it. The partition into sequencer, PWM
// and fixed-point converter follows the design; the wiring details above are
// this design's choice.
module boost_hil_top
  import boost_pkg::*;
#(
  parameter int  NI     = 24,
  parameter int  NV     = 32,
  parameter real L_H    = 5.0e-3,
  parameter real C_F    = 100.0e-6,
  parameter real DT_S   = 10.0e-9,
  parameter int  PERIOD = 1000,
  parameter int  DEPTH  = 1000,
  parameter int  DW     = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run,
  // duty-cycle sequence
  input  logic                     mem_we,
  input  logic [$clog2(DEPTH)-1:0] mem_waddr,
  input  logic [DW-1:0]            mem_wdata,
  input  logic [$clog2(DEPTH)-1:0] last_addr,
  // converter inputs
  input  logic signed [NV:0]       vin,
  input  logic signed [NI:0]       ir,
  input  logic                     load,
  input  logic signed [NI:0]       iin_load,
  input  logic signed [NV:0]       vout_load,
  // converter state and observation
  output logic signed [NI:0]       iin,
  output logic signed [NV:0]       vout,
  output logic                     pwm,
  output boost_mode_e              mode,
  output logic [DW-1:0]            duty,
  output logic [$clog2(DEPTH)-1:0] seq_addr,
  output logic [$clog2(PERIOD)-1:0] pwm_step,
  output logic                     period_end,
  output logic                     seq_wrap
);

  logic [DW-1:0] mem_rdata;

  seq_address #(.DEPTH(DEPTH)) u_address (
    .clk       (clk),
    .rst_n     (rst_n),
    .advance   (period_end),
    .last_addr (last_addr),
    .addr      (seq_addr),
    .wrap      (seq_wrap)
  );

  duty_cycle_mem #(.DEPTH(DEPTH), .DW(DW)) u_duty_mem (
    .clk   (clk),
    .we    (mem_we),
    .waddr (mem_waddr),
    .wdata (mem_wdata),
    .raddr (seq_addr),
    .rdata (mem_rdata)
  );

  pwm_module #(.PERIOD(PERIOD), .DW(DW)) u_pwm (
    .clk        (clk),
    .rst_n      (rst_n),
    .en         (run),
    .duty       (mem_rdata),
    .pwm        (pwm),
    .period_end (period_end),
    .step       (pwm_step),
    .duty_q     (duty)
  );

  boost_converter #(
    .NI(NI), .NV(NV), .L_H(L_H), .C_F(C_F), .DT_S(DT_S)
  ) u_converter (
    .clk       (clk),
    .rst_n     (rst_n),
    .step_en   (run),
    .q         (pwm),
    .vin       (vin),
    .ir        (ir),
    .load      (load),
    .iin_load  (iin_load),
    .vout_load (vout_load),
    .iin       (iin),
    .vout      (vout),
    .mode      (mode)
  );

endmodule
