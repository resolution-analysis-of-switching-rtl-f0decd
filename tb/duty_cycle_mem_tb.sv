// Self-checking testbench of duty_cycle_mem: fills all 1000 words with a
// pattern, reads them back in random order and checks the one-cycle read
// latency, then overwrites a few words and checks that the others keep their
// contents and that writes beyond the depth are ignored.
module duty_cycle_mem_tb;

  localparam int DEPTH = 1000, DW = 10, AW = $clog2(DEPTH);

  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;

  int checks = 0, failures = 0;
  logic [DW-1:0] model [DEPTH];

  always #5 clk = ~clk;

  duty_cycle_mem #(.DEPTH(DEPTH), .DW(DW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [DW-1:0] pattern(int a);
    return DW'((a * 37 + 11) % 1024);
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int a;
    @(negedge clk);
    for (int k = 0; k < DEPTH; k++) begin
      we = 1'b1; waddr = AW'(k); wdata = pattern(k); model[k] = pattern(k);
      @(negedge clk);
    end
    // out-of-range write must not alias onto a stored word
    waddr = AW'(1000); wdata = '1;
    @(negedge clk);
    waddr = AW'(1023);
    @(negedge clk);
    we = 1'b0;
    for (int k = 0; k < 600; k++) begin
      a = $urandom_range(0, DEPTH - 1);
      raddr = AW'(a);
      @(negedge clk);
      check(rdata == model[a], $sformatf("word %0d read %0d expected %0d", a, rdata, model[a]));
    end
    // read latency: the new word appears only after the clock edge
    raddr = AW'(5);
    @(negedge clk);
    raddr = AW'(6);
    #1;
    check(rdata == model[5], "read data is registered");
    // rewrite a few words
    for (int k = 100; k < 110; k++) begin
      we = 1'b1; waddr = AW'(k); wdata = ~pattern(k); model[k] = ~pattern(k);
      @(negedge clk);
    end
    we = 1'b0;
    for (int k = 95; k < 115; k++) begin
      raddr = AW'(k);
      @(negedge clk);
      check(rdata == model[k], $sformatf("after rewrite word %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
