// tb_rtp_timers: self-checking test of the deadline timer bank.
// A reference model counts each timer down to zero; the test reloads
// timers only when the model says they have expired (as the core does)
// and checks `expired` and every count, cycle by cycle. It also checks the
// period directly: reloading with N whenever the timer expires makes the
// reloads exactly N cycles apart, for N = 8 and for the largest value,
// 65535.
module tb_rtp_timers;
  logic clk = 0, rst;
  logic [1:0] sel;
  logic expired, reload;
  logic [15:0] value;
  logic [15:0] count [4];
  int ref_t [4];
  int checks = 0, failures = 0;

  rtp_timers dut (.*);

  always #5 clk = ~clk;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, period;
    rst = 1; sel = 0; reload = 0; value = 0;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    foreach (ref_t[i]) ref_t[i] = 0;
    // random operation
    for (int n = 0; n < 3000; n++) begin
      sel = 2'($urandom);
      value = 16'($urandom_range(0, 40));
      #1;
      chk(int'(expired), int'(ref_t[sel] <= 1), "expired");
      reload = expired && ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      for (int i = 0; i < 4; i++) begin
        if (reload && sel == 2'(i)) ref_t[i] = value;
        else if (ref_t[i] > 0) ref_t[i]--;
        chk(int'(count[i]), ref_t[i], $sformatf("count[%0d]", i));
      end
      reload = 0;
    end
    // period test: deadline loop on timer 2 with N = 8
    sel = 2; value = 8; last = -1;
    for (int c = 0; c < 100; c++) begin
      #1;
      reload = expired;
      if (expired) begin
        if (last >= 0) begin
          period = c - last;
          chk(period, 8, "deadline period");
        end
        last = c;
      end
      @(posedge clk); #1;
      reload = 0;
    end
    // full-range reload: 65535 cycles until the next deadline completes
    sel = 3; value = 16'hffff;
    while (!expired) begin @(posedge clk); #1; end
    reload = 1; @(posedge clk); #1; reload = 0;
    last = 0;
    while (!expired && last < 70000) begin last++; @(posedge clk); #1; end
    chk(last + 1, 65535, "full-range deadline period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
