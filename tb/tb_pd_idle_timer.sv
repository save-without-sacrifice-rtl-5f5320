// tb_pd_idle_timer: self-checking test of the per-rank idle time-out counter.
//
// Drives random restarts and time-out values and compares `expired` every
// cycle with a reference count kept by the test (cycles since the last
// restart, saturating at 2^LAMBDA_W-1). Directed parts check the exact
// latency (expiry exactly lambda+1 cycles after the restart cycle), that a
// restart drops `expired` on the next cycle, and that a long idle period
// saturates instead of wrapping. Inputs change on the falling clock edge.
module tb_pd_idle_timer;
  localparam int LW = 12;

  logic          clk = 1'b0;
  logic          rst_n, restart, expired;
  logic [LW-1:0] lambda;

  pd_idle_timer dut (.clk, .rst_n, .restart, .lambda, .expired);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int ref_cnt;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One cycle: check the output against the reference, then apply inputs.
  task automatic step(input bit rs, input int lam);
    @(negedge clk);
    chk(expired == (ref_cnt >= int'(lambda)),
        $sformatf("count %0d lambda %0d expired %0b", ref_cnt, lambda, expired));
    lambda  = LW'(lam);
    restart = rs;
    ref_cnt = rs ? 0 : ((ref_cnt == (1 << LW) - 1) ? ref_cnt : ref_cnt + 1);
  endtask

  initial begin
    int lam, first;
    rst_n = 1'b0; restart = 1'b0; lambda = LW'(36);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ref_cnt = 0;
    // Directed: restart, then measure when expiry appears for lambda = 36.
    step(1'b1, 36);
    first = -1;
    for (int k = 1; k <= 60; k++) begin
      @(negedge clk);
      if (expired && first < 0) first = k;
      restart = 1'b0;
      ref_cnt++;
    end
    // Restart applied in the cycle before k = 1: count is k-1 at step k.
    chk(first == 37, $sformatf("expiry latency %0d, want 37", first));
    // A restart clears it on the next cycle.
    step(1'b1, 36);
    step(1'b0, 36);
    chk(!expired, "expired after restart");
    // Random restarts and lambda values.
    for (int i = 0; i < 20000; i++) begin
      if (i % 500 == 0) lam = 1 + $urandom_range(99);
      step($urandom_range(60) == 0, lam);
    end
    // Saturation: lambda at the top of the range, no restart for 5000 cycles.
    step(1'b1, 4095);
    for (int i = 0; i < 5000; i++) step(1'b0, 4095);
    chk(expired, "count wrapped instead of saturating");
    step(1'b0, 4000);
    step(1'b0, 4000);
    chk(expired, "saturated count below lambda");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
