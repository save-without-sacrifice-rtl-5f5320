// tb_adpd_phase_change: the adaptive time-out following a change of access
// pattern, with the manager at its default parameters (8 ranks, 20 us
// epochs at DDR4-2400).
//
// All eight ranks see the same three phases, staggered by a few cycles:
//   A (30 epochs): one request every 200 cycles. A short time-out makes the
//     ranks drop CKE between requests and wake up about 120 times per epoch;
//     lambda must climb until it covers the 200-cycle gap. With strictly
//     periodic traffic it then alternates between just below and just above
//     the gap: an epoch with about 60 exits per rank (step up) follows one
//     with none (step down). The test checks that lambda stays within one
//     step of the gap and that every other epoch is free of exits.
//   B (30 epochs): no requests. Lambda must walk back down to lambda_min
//     and the ranks must spend at least 95% of the phase in power-down.
//   C (10 epochs): one request every 10 cycles. No rank may power down.
// The test also checks that no command is issued to a rank that is not
// ready and that every request is served. It prints the lambda trace and the
// power-down residency per phase. Inputs change on the falling clock edge.
module tb_adpd_phase_change;
  import adpd_pkg::*;
  localparam int NR = 8, EP = 24000, LW = 12, EW = 8;
  localparam int GAP_A = 200, GAP_C = 10;
  localparam int EP_A = 30, EP_B = 30, EP_C = 10;

  logic          clk = 1'b0;
  logic          rst_n;
  logic [NR-1:0] cmd_issued, req_pending, pd_allowed;
  logic [NR-1:0] cke, rank_ready, pd_enter, pd_exit;
  pd_state_t     pd_state [NR];
  logic [LW-1:0] lambda   [NR];
  logic [EW-1:0] eps      [NR];
  logic          epoch_tick;

  adpd_pd_manager dut (
    .clk, .rst_n, .cmd_issued, .req_pending, .pd_allowed, .cke, .rank_ready,
    .pd_state, .lambda, .eps, .pd_enter, .pd_exit, .epoch_tick
  );

  always #1 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat ((EP_A + EP_B + EP_C) * EP + 5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pend [NR];
  int exits_epoch, entries_phase, min_late_exits;
  longint down_cycles, arrived, served;
  int rr;

  // Runs `ne` epochs with a request every `gap` cycles per rank (0: none).
  // Returns the exits of the first and of the last epoch of the phase.
  task automatic phase(input string nm, input int ne, input int gap,
                       output int first_exits, output int last_exits);
    int tick_count;
    longint c;
    tick_count = 0; c = 0; exits_epoch = 0; entries_phase = 0; down_cycles = 0;
    first_exits = -1; last_exits = -1; min_late_exits = 1 << 30;
    while (tick_count < ne) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin
        if (pd_exit[r]) exits_epoch++;
        if (pd_enter[r]) entries_phase++;
        if (!cke[r]) down_cycles++;
      end
      if (epoch_tick) begin
        tick_count++;
        if (first_exits < 0) first_exits = exits_epoch;
        last_exits = exits_epoch;
        if (tick_count > ne - 10 && exits_epoch < min_late_exits) min_late_exits = exits_epoch;
        if (tick_count % 5 == 0)
          $display("%s epoch %0d: exits %0d, lambda[0] %0d", nm, tick_count, exits_epoch, lambda[0]);
        exits_epoch = 0;
      end
      for (int r = 0; r < NR; r++)
        if (gap > 0 && ((c + longint'(r)) % longint'(gap)) == 0) begin
          pend[r]++; arrived++;
        end
      cmd_issued = '0;
      for (int k = 0; k < NR; k++) begin
        int r;
        r = (rr + k) % NR;
        if (cmd_issued == '0 && pend[r] > 0 && rank_ready[r]) begin
          cmd_issued[r] = 1'b1; pend[r]--; served++; rr = (r + 1) % NR;
        end
      end
      for (int r = 0; r < NR; r++) req_pending[r] = (pend[r] > 0);
      c++;
    end
  endtask

  initial begin
    int fa, la, fb, lb, fc, lc;
    longint len;
    rst_n = 1'b0; cmd_issued = '0; req_pending = '0; pd_allowed = '1;
    arrived = 0; served = 0; rr = 0;
    for (int r = 0; r < NR; r++) pend[r] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    len = longint'(NR) * EP;

    phase("A", EP_A, GAP_A, fa, la);
    $display("A: exits first epoch %0d, last epoch %0d, fewest in the last ten %0d, power-down %0d%%",
             fa, la, min_late_exits, int'(down_cycles * 100 / (len * EP_A)));
    chk(fa > NR * DEF_THETA_HI, "phase A starts with frequent exits");
    chk(min_late_exits <= NR * DEF_THETA_HI, "phase A exits never brought down to theta_hi per rank");
    for (int r = 0; r < NR; r++)
      chk(int'(lambda[r]) >= GAP_A - 2 * DEF_DELTA && int'(lambda[r]) <= GAP_A + 2 * DEF_DELTA,
          $sformatf("rank %0d lambda %0d after phase A", r, lambda[r]));

    phase("B", EP_B, 0, fb, lb);
    $display("B: exits first epoch %0d, last epoch %0d, power-down %0d%%",
             fb, lb, int'(down_cycles * 100 / (len * EP_B)));
    chk(down_cycles * 100 >= len * EP_B * 95, "phase B power-down residency below 95%");
    for (int r = 0; r < NR; r++)
      chk(lambda[r] == LW'(DEF_LAMBDA_MIN), $sformatf("rank %0d lambda %0d after phase B", r, lambda[r]));

    phase("C", EP_C, GAP_C, fc, lc);
    $display("C: entries %0d, power-down %0d%%", entries_phase,
             int'(down_cycles * 100 / (len * EP_C)));
    chk(entries_phase == 0, "busy phase entered power-down");
    chk(fc == NR, "each rank wakes once at the start of phase C");

    begin
      longint left;
      left = 0;
      for (int r = 0; r < NR; r++) left += longint'(pend[r]);
      chk(served + left == arrived && left <= longint'(NR), "requests lost or starved");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
