// tb_adpd_lambda_ctrl: self-checking test of the adaptive time-out rule.
//
// With the default parameters (lambda 36..2400 cycles, step 12, thresholds
// 2 and 5) the test feeds exit pulses and epoch ticks and checks `lambda`
// and `eps` every cycle against its own model. Directed epochs cover each
// branch of the rule: epsilon 0 and 1 (step down), 2 and 5 (the thresholds
// themselves, unchanged), 3 (unchanged), 6 and more (step up); the clamp at
// lambda_max after a long run of busy epochs and at lambda_min after idle
// ones; an exit in the tick cycle counting in the new epoch; and the
// saturation of epsilon. Random epochs follow. Inputs change on the falling
// clock edge.
module tb_adpd_lambda_ctrl;
  localparam int LMIN = 36, LMAX = 2400, DLT = 12, TLO = 2, THI = 5;
  localparam int LW = 12, EW = 8;

  logic          clk = 1'b0;
  logic          rst_n, pd_exit, epoch_tick;
  logic [LW-1:0] lambda;
  logic [EW-1:0] eps;

  adpd_lambda_ctrl dut (.clk, .rst_n, .pd_exit, .epoch_tick, .lambda, .eps);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_lambda, m_eps;
  int n_up = 0, n_down = 0, n_hold = 0, n_max = 0, n_min = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One cycle with the given inputs; the model follows the published rule.
  task automatic step(input bit ex, input bit tk);
    @(negedge clk);
    chk(int'(lambda) == m_lambda, $sformatf("lambda %0d, model %0d", lambda, m_lambda));
    chk(int'(eps) == m_eps, $sformatf("eps %0d, model %0d", eps, m_eps));
    pd_exit = ex; epoch_tick = tk;
    if (tk) begin
      if (m_eps > THI) begin
        n_up++;
        m_lambda += DLT;
        if (m_lambda >= LMAX) begin m_lambda = LMAX; n_max++; end
      end else if (m_eps < TLO) begin
        n_down++;
        m_lambda -= DLT;
        if (m_lambda <= LMIN) begin m_lambda = LMIN; n_min++; end
      end else
        n_hold++;
      m_eps = ex ? 1 : 0;
    end else if (ex && m_eps < (1 << EW) - 1)
      m_eps++;
  endtask

  // An epoch of `len` cycles with `n` exits spread over it, then the tick.
  task automatic epoch(input int n, input int len);
    for (int c = 0; c < len - 1; c++)
      step(c < 2 * n && c % 2 == 0, 1'b0);
    step(1'b0, 1'b1);
  endtask

  initial begin
    int base;
    rst_n = 1'b0; pd_exit = 1'b0; epoch_tick = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    m_lambda = LMIN; m_eps = 0;
    step(1'b0, 1'b0);
    chk(lambda == LW'(LMIN), "reset value is lambda_min");
    // Thresholds, one epoch each; lambda first raised so a decrease shows.
    epoch(6, 40);  epoch(6, 40); epoch(6, 40);
    step(1'b0, 1'b0);
    chk(lambda == LW'(LMIN + 3 * DLT), "three steps up");
    base = m_lambda;
    epoch(5, 40); step(1'b0, 1'b0); chk(lambda == LW'(base), "eps = theta_hi keeps lambda");
    epoch(2, 40); step(1'b0, 1'b0); chk(lambda == LW'(base), "eps = theta_lo keeps lambda");
    epoch(3, 40); step(1'b0, 1'b0); chk(lambda == LW'(base), "eps inside the band keeps lambda");
    epoch(1, 40); step(1'b0, 1'b0); chk(lambda == LW'(base - DLT), "eps = 1 steps down");
    epoch(0, 40); step(1'b0, 1'b0); chk(lambda == LW'(base - 2 * DLT), "eps = 0 steps down");
    // Clamp at lambda_max: 200 busy epochs.
    for (int e = 0; e < 200; e++) epoch(10, 30);
    step(1'b0, 1'b0);
    chk(lambda == LW'(LMAX), "clamped at lambda_max");
    // Clamp at lambda_min: 200 idle epochs.
    for (int e = 0; e < 200; e++) epoch(0, 8);
    step(1'b0, 1'b0);
    chk(lambda == LW'(LMIN), "clamped at lambda_min");
    // Exit in the tick cycle counts in the new epoch.
    epoch(0, 10);
    step(1'b1, 1'b1);
    step(1'b0, 1'b0);
    chk(eps == EW'(1), "exit on the tick belongs to the new epoch");
    // Saturation of epsilon.
    for (int c = 0; c < 300; c++) step(1'b1, 1'b0);
    chk(eps == '1, "epsilon saturates");
    step(1'b0, 1'b1);
    // Random epochs.
    for (int e = 0; e < 3000; e++) begin
      int len, p;
      len = 4 + $urandom_range(40);
      p = $urandom_range(3);
      for (int c = 0; c < len; c++) step($urandom_range(7) < p, 1'b0);
      step($urandom_range(1) == 1, 1'b1);
    end
    step(1'b0, 1'b0);
    chk(n_up > 0 && n_down > 0 && n_hold > 0 && n_max > 0 && n_min > 0,
        "every branch of the rule exercised");
    $display("up=%0d down=%0d hold=%0d clamp_max=%0d clamp_min=%0d", n_up, n_down, n_hold, n_max, n_min);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
