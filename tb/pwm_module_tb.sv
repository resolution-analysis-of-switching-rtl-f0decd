// Self-checking testbench of pwm_module at the default 1000-step period.
// Counts the high steps of each period and compares them with the duty value
// presented during the period before (the shadow-register timing), for duty
// values 0, 1, 500, 999, 1000 and 1023 and random ones. Also checks that
// period_end comes exactly every 1000 enabled cycles, that a held en freezes
// the counter, and that the first period after reset is all low.
module pwm_module_tb;

  localparam int PERIOD = 1000, DW = 10;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [DW-1:0] duty = '0;
  logic pwm, period_end;
  logic [$clog2(PERIOD)-1:0] step;
  logic [DW-1:0] duty_q;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pwm_module #(.PERIOD(PERIOD), .DW(DW)) dut (.*);

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
    int high, end_at, expected;
    logic [DW-1:0] seq [$];
    seq = '{10'd0, 10'd1, 10'd500, 10'd999, 10'd1000, 10'd1023, 10'd250};
    for (int r = 0; r < 5; r++) seq.push_back(DW'($urandom_range(0, 1023)));

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    expected = 0;  // the first period runs with the reset duty of 0
    foreach (seq[n]) begin
      duty = seq[n];
      high = 0;
      end_at = -1;
      for (int k = 0; k < PERIOD; k++) begin
        if (k == 0) check(step == 0, "period starts at step 0");
        if (pwm) high++;
        if (period_end) end_at = k;
        @(negedge clk);
      end
      check(high == expected, $sformatf("period %0d: %0d high steps, expected %0d", n, high, expected));
      check(end_at == PERIOD - 1, $sformatf("period_end at step %0d", end_at));
      expected = (int'(seq[n]) > PERIOD) ? PERIOD : int'(seq[n]);
      // a pause with en low freezes the counter
      if (n == 3) begin
        en = 1'b0;
        repeat (7) @(negedge clk);
        check(step == 0 && !period_end, "en low holds the counter");
        en = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
