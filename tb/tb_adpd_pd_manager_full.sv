// tb_adpd_pd_manager_full: end-to-end test of the adaptive power-down manager with every parameter at its default
// (8 ranks, 20 us epochs at DDR4-2400, lambda from 30 ns to 2 us) over 210
// epochs, enough for lambda to climb from its minimum to its maximum.
//
// A small memory-controller model surrounds the manager: per rank a request
// generator with its own traffic pattern, a request counter, and a channel
// scheduler that issues at most one command per cycle, round-robin over the
// ranks that have requests and are ready. Each request is served by one
// command. Traffic per rank:
//   0 busy (a request every 8..15 cycles)   1 gaps of 200 cycles
//   2 no traffic                            3 four requests per epoch
//   4 gaps of 500, entry vetoed (pd_allowed low) in alternate 1000-cycle windows
//   5 random, one request per 300 cycles on average
//   6 gaps of 1.25 x LAMBDA_MAX             7 a request in the cycle that
//                                             follows each power-down entry
// Every 64th cycle the scheduler issues nothing, so that a request can wait.
// Every cycle the test recomputes, from its own idle counters, exit counts
// and lambda model, what the manager must do: when CKE must fall and rise,
// how long rank_ready stays low after an exit (TXP), the epoch ticks and the
// lambda chosen at each tick. It counts how often each mechanism happened
// (entry, exit, tCKE hold, entry blocked by a pending request or by
// pd_allowed, lambda up/down/unchanged, clamp at both bounds) and counts a
// failure for any that never happened. Inputs are driven and outputs sampled
// on the falling clock edge.
module tb_adpd_pd_manager_full;
  import adpd_pkg::*;

  localparam int NR   = 8;
  localparam int EP   = 24000;
  localparam longint EPL = longint'(EP);
  localparam int LMIN = 36;
  localparam int LMAX = 2400;
  localparam int DLT  = 12;
  localparam int TLO  = 2;
  localparam int THI  = 5;
  localparam int TCK_E = 6;
  localparam int TX_P  = 8;
  localparam int LW   = 12;
  localparam int EW   = 8;
  localparam int NEPOCHS = 210;
  localparam longint NCYC = longint'(EP) * NEPOCHS + 10;

  logic              clk = 1'b0;
  logic              rst_n;
  logic [NR-1:0]     cmd_issued, req_pending, pd_allowed;
  logic [NR-1:0]     cke, rank_ready, pd_enter, pd_exit;
  pd_state_t         pd_state [NR];
  logic [LW-1:0]     lambda   [NR];
  logic [EW-1:0]     eps      [NR];
  logic              epoch_tick;

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

  // Watchdog.
  initial begin
    repeat (int'(NCYC) + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Test state, per rank.
  int  pend [NR];          // outstanding requests
  int  ctdn [NR];          // cycles to the next arrival
  longint last_restart [NR]; // cycle of the last command or exit
  longint down_at [NR];    // first cycle with CKE low
  longint pend_at [NR];    // first cycle with a request while down
  longint up_at [NR];      // first cycle with CKE high after an exit
  longint idle_c [NR];     // idle count of each timer in this cycle
  int  m_lambda_next [NR];
  bit  exp_enter [NR], exp_exit [NR];
  int  m_lambda [NR];
  int  m_eps [NR];
  int  rr = 0;
  longint cyc, last_tick;
  longint served = 0, arrived = 0;

  // Mechanism counters.
  int n_enter = 0, n_exit = 0, n_tcke_hold = 0, n_txp = 0;
  int n_blk_pend = 0, n_blk_allow = 0;
  int n_up = 0, n_down = 0, n_hold = 0, n_cmax = 0, n_cmin = 0, n_ticks = 0;

  function automatic int gap_of(int r);
    case (r)
      0: return 8 + int'($urandom_range(7));
      1: return 200;
      3: return EP / 4;
      4: return 500;
      5: return 1 + int'($urandom_range(598));
      6: return LMAX + LMAX / 4;
      default: return -1;
    endcase
  endfunction

  initial begin
    rst_n = 1'b0; cmd_issued = '0; req_pending = '0; pd_allowed = '1;
    for (int r = 0; r < NR; r++) begin
      pend[r] = 0; ctdn[r] = gap_of(r); last_restart[r] = -1; m_lambda_next[r] = LMIN;
      down_at[r] = -1; pend_at[r] = -1; up_at[r] = -1; idle_c[r] = 0;
      exp_enter[r] = 0; exp_exit[r] = 0; m_lambda[r] = LMIN; m_eps[r] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Cycle 0 is the cycle in which reset is released: the registers hold
    // their reset values and the inputs above are applied. The loop starts
    // with cycle 1.
    cyc = 1; last_tick = -1;
    while (cyc < NCYC) begin
      @(negedge clk);
      // ---------------- observe and check the outputs of this cycle -------
      // Epoch tick: every EP cycles, first in cycle EP-1.
      chk(epoch_tick == ((cyc % EPL) == EPL - 1), $sformatf("epoch tick at %0d", cyc));
      // Idle count each timer holds in this cycle (restarts before this cycle).
      for (int r = 0; r < NR; r++) idle_c[r] = cyc - last_restart[r] - 1;
      for (int r = 0; r < NR; r++) begin
        chk(cke[r] == (pd_state[r] != PD_DOWN), "cke vs state");
        chk(rank_ready[r] == (pd_state[r] == PD_STANDBY), "ready vs state");
        chk(pd_enter[r] == exp_enter[r],
            $sformatf("rank %0d entry at cycle %0d: got %0b", r, cyc, pd_enter[r]));
        chk(pd_exit[r] == exp_exit[r],
            $sformatf("rank %0d exit at cycle %0d: got %0b", r, cyc, pd_exit[r]));
        chk(int'(lambda[r]) == m_lambda[r],
            $sformatf("rank %0d lambda %0d, model %0d, cycle %0d", r, lambda[r], m_lambda[r], cyc));
        chk(int'(eps[r]) == m_eps[r], $sformatf("rank %0d eps", r));
        if (pd_enter[r]) begin
          n_enter++;
          chk(pd_state[r] == PD_DOWN, "state after entry");
          down_at[r] = cyc; pend_at[r] = -1;
        end
        if (pd_exit[r]) begin
          n_exit++;
          chk(cyc - down_at[r] >= longint'(TCK_E), $sformatf("rank %0d CKE low shorter than tCKE", r));
          if (pend_at[r] >= 0 && pend_at[r] < down_at[r] + longint'(TCK_E) - 1) begin
            n_tcke_hold++;
            chk(cyc == down_at[r] + longint'(TCK_E), "exit not at the end of tCKE");
          end else
            chk(cyc == pend_at[r] + 1, "exit not one cycle after the request");
          up_at[r] = cyc;
          last_restart[r] = cyc;
        end
        if (up_at[r] >= 0) begin
          if (cyc < up_at[r] + longint'(TX_P))
            chk(pd_state[r] == PD_EXITING && !rank_ready[r], "ready inside tXP");
          else if (cyc == up_at[r] + longint'(TX_P)) begin
            chk(rank_ready[r], "not ready after tXP");
            n_txp++;
            up_at[r] = -1;
          end
        end
      end
      // Epoch end: lambda model (the new value shows in the next cycle).
      if (epoch_tick) begin
        n_ticks++;
        for (int r = 0; r < NR; r++) begin
          int nl;
          nl = m_lambda[r];
          if (m_eps[r] > THI) begin
            nl = m_lambda[r] + DLT;
            if (nl > LMAX) begin nl = LMAX; n_cmax++; end
            n_up++;
          end else if (m_eps[r] < TLO) begin
            nl = m_lambda[r] - DLT;
            if (nl < LMIN) begin nl = LMIN; n_cmin++; end
            n_down++;
          end else
            n_hold++;
          m_lambda_next[r] = nl;
          m_eps[r] = 0;
        end
      end
      // Exits of this cycle count towards the (possibly new) epoch.
      for (int r = 0; r < NR; r++)
        if (pd_exit[r] && m_eps[r] < (1 << EW) - 1) m_eps[r]++;
      // ---------------- drive the inputs of this cycle ---------------------
      // Arrivals.
      for (int r = 0; r < NR; r++) begin
        if (r == 7) begin
          if (pd_enter[r]) begin pend[r]++; arrived++; end
        end else if (ctdn[r] > 0) begin
          ctdn[r]--;
          if (ctdn[r] == 0) begin
            pend[r]++; arrived++;
            ctdn[r] = gap_of(r);
          end
        end
      end
      // Scheduler: one command per cycle, round-robin over ready ranks.
      // Every 64th cycle the channel is busy elsewhere and issues nothing.
      cmd_issued = '0;
      for (int k = 0; k < NR && (cyc % 64) != 63; k++) begin
        int r;
        r = (rr + k) % NR;
        if (cmd_issued == '0 && pend[r] > 0 && rank_ready[r]) begin
          cmd_issued[r] = 1'b1;
          pend[r]--; served++;
          last_restart[r] = cyc;
          rr = (r + 1) % NR;
        end
      end
      for (int r = 0; r < NR; r++) begin
        // The request issued this cycle has left the queue already.
        req_pending[r] = (pend[r] > 0);
        pd_allowed[r]  = !(r == 4 && ((cyc / 1000) % 2 == 1));
        if (pd_state[r] == PD_DOWN && req_pending[r] && pend_at[r] < 0)
          pend_at[r] = cyc;
      end
      // ---------------- predict the next cycle ------------------------------
      for (int r = 0; r < NR; r++) begin
        bit expired;
        expired = (idle_c[r] >= longint'(m_lambda[r]));
        exp_enter[r] = (pd_state[r] == PD_STANDBY) && expired &&
                       !req_pending[r] && pd_allowed[r];
        if (pd_state[r] == PD_STANDBY && expired && req_pending[r]) n_blk_pend++;
        if (pd_state[r] == PD_STANDBY && expired && !req_pending[r] && !pd_allowed[r])
          n_blk_allow++;
        exp_exit[r] = (pd_state[r] == PD_DOWN) && req_pending[r] &&
                      (cyc >= down_at[r] + longint'(TCK_E) - 1);
        if (epoch_tick) m_lambda[r] = m_lambda_next[r];
      end
      cyc++;
    end
    // ---------------- end of run ------------------------------------------
    begin
      longint left;
      left = 0;
      for (int r = 0; r < NR; r++) left += longint'(pend[r]);
      chk(served + left == arrived, "request bookkeeping");
      chk(left <= longint'(NR), "requests left unserved");
    end
    $display("mechanisms: entries=%0d exits=%0d tcke_hold=%0d txp_waits=%0d blocked_by_pending=%0d blocked_by_pd_allowed=%0d",
             n_enter, n_exit, n_tcke_hold, n_txp, n_blk_pend, n_blk_allow);
    $display("lambda: epochs=%0d up=%0d down=%0d unchanged=%0d clamp_max=%0d clamp_min=%0d",
             n_ticks, n_up, n_down, n_hold, n_cmax, n_cmin);
    for (int r = 0; r < NR; r++) $display("rank %0d final lambda %0d", r, lambda[r]);
    chk(n_enter > 0, "no power-down entry");
    chk(n_exit > 0, "no power-down exit");
    chk(n_tcke_hold > 0, "tCKE hold never exercised");
    chk(n_txp > 0, "tXP wait never exercised");
    chk(n_blk_pend > 0, "entry never blocked by a pending request");
    chk(n_blk_allow > 0, "entry never blocked by pd_allowed");
    chk(n_up > 0, "lambda never increased");
    chk(n_down > 0, "lambda never decreased");
    chk(n_hold > 0, "lambda never held in the dead band");
    chk(n_cmax > 0, "lambda never clamped at the maximum");
    chk(n_cmin > 0, "lambda never clamped at the minimum");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
