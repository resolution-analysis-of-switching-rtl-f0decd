// Duty-cycle memory: the open-loop sequence of duty cycles applied to the
// converter model, one word per switching period.
//
// A simple dual-port RAM of DEPTH words of DW bits. The write port loads the
// sequence (from a host or a testbench); the read port is synchronous, so
// rdata holds the word at raddr one clock after raddr is presented, and it
// keeps following raddr every cycle. The default depth of 1000 words holds one
// half period of 50 Hz mains at 100 kHz switching; the width of 10 bits is
// that of the duty-cycle bus. The memory's organisation is this design's
// choice. The contents are not reset.
module duty_cycle_mem #(
  parameter int DEPTH = 1000,
  parameter int DW    = 10
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW-1:0]            wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DW-1:0]            rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
