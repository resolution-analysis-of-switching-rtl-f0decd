// Self-checking testbench of seq_address: advances the address with random
// gaps between advance pulses and checks it against a model counter, with
// wrap points at the end of the memory (999) and at a shorter sequence
// (832 words, a half period of 60 Hz mains). Checks that wrap is flagged
// exactly on the advance from last_addr.
module seq_address_tb;

  localparam int DEPTH = 1000, AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0, advance = 1'b0;
  logic [AW-1:0] last_addr = AW'(DEPTH - 1);
  logic [AW-1:0] addr;
  logic wrap;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  seq_address #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int model, wraps;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(addr == 0, "reset address 0");
    model = 0;
    wraps = 0;
    for (int pass = 0; pass < 2; pass++) begin
      last_addr = (pass == 0) ? AW'(DEPTH - 1) : AW'(831);
      for (int n = 0; n < 2100; n++) begin
        advance = 1'b1;
        #1;
        check(wrap == (model == int'(last_addr)), $sformatf("wrap flag at %0d", model));
        @(negedge clk);
        advance = 1'b0;
        model = (model == int'(last_addr)) ? 0 : model + 1;
        if (model == 0) wraps++;
        if ((n % 97) == 0) check(int'(addr) == model, $sformatf("address %0d expected %0d", addr, model));
        repeat ($urandom_range(0, 2)) @(negedge clk);
        if ((n % 97) == 1) check(int'(addr) == model, "address holds without advance");
      end
    end
    check(wraps >= 4, "sequence wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
