// Address generator of the duty-cycle sequence.
//
// Steps through the duty-cycle memory one word per switching period: on each
// advance pulse (the PWM's last step of a period) the address moves to the
// next word, and after the word at last_addr it returns to 0, so a sequence
// of last_addr+1 periods repeats (for instance one half period of the mains
// voltage). The wrap point is a run-time input so sequences of other mains
// frequencies fit the same memory; that and the counter itself are this
// design's choice. Reset (active low, asynchronous) sets the address to 0.
module seq_address #(
  parameter int DEPTH = 1000
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     advance,
  input  logic [$clog2(DEPTH)-1:0] last_addr,
  output logic [$clog2(DEPTH)-1:0] addr,
  output logic                     wrap      // advance from last_addr to 0
);

  assign wrap = advance && (addr >= last_addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       addr <= '0;
    else if (wrap)    addr <= '0;
    else if (advance) addr <= addr + 1'b1;
  end

endmodule
