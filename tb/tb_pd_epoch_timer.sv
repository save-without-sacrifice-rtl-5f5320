// tb_pd_epoch_timer: self-checking test of the per-channel epoch timer.
//
// Runs the timer at its default epoch (24000 cycles, 20 us at DDR4-2400) and
// a second instance at 7 cycles. It checks every cycle that the tick is high
// exactly in cycles EPOCH-1, 2*EPOCH-1, ... counted from reset release, and
// that a reset in the middle of an epoch restarts the count.
module tb_pd_epoch_timer;
  localparam int EP_A = 24000;
  localparam int EP_B = 7;

  logic clk = 1'b0;
  logic rst_n, tick_a, tick_b;

  pd_epoch_timer                      dut_a (.clk, .rst_n, .epoch_tick(tick_a));
  pd_epoch_timer #(.EPOCH_CYCLES(EP_B)) dut_b (.clk, .rst_n, .epoch_tick(tick_b));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, ticks_a = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checks cycles 1..n after a reset released in cycle 0.
  task automatic run(input int n);
    for (int c = 1; c <= n; c++) begin
      @(negedge clk);
      chk(tick_a == ((c % EP_A) == EP_A - 1), $sformatf("tick A at cycle %0d", c));
      chk(tick_b == ((c % EP_B) == EP_B - 1), $sformatf("tick B at cycle %0d", c));
      if (tick_a) ticks_a++;
    end
  endtask

  initial begin
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(3 * EP_A + 5);
    chk(ticks_a == 3, "three epochs of 24000 cycles");
    // Reset in mid-epoch.
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    run(EP_A + 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
