// tb_pd_rank_fsm: self-checking test of the per-rank CKE state machine.
//
// Uses the DDR4-2400 defaults (tCKE = 6, tXP = 8 cycles). Directed cases
// measure the timing: CKE falls one cycle after the entry condition; a
// request that is already waiting holds CKE low for exactly tCKE cycles; a
// request arriving later raises CKE one cycle after it; rank_ready returns
// exactly tXP cycles after CKE rises; entry is refused while a request is
// pending or pd_allowed is low. A random phase then compares cke,
// rank_ready, state and both pulses every cycle with a model kept by the
// test. Inputs change on the falling clock edge.
module tb_pd_rank_fsm;
  import adpd_pkg::*;
  localparam int TCKE = 6, TXP = 8;

  logic      clk = 1'b0;
  logic      rst_n, timeout_expired, req_pending, pd_allowed;
  logic      cke, rank_ready, pd_enter, pd_exit;
  pd_state_t state;

  pd_rank_fsm dut (.clk, .rst_n, .timeout_expired, .req_pending, .pd_allowed,
                   .cke, .rank_ready, .state, .pd_enter, .pd_exit);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model: mode 0 standby, 1 down, 2 exiting; timer counts cycles in mode.
  int m_mode, m_time;
  bit m_enter, m_exit;

  task automatic step(input bit ex, input bit rq, input bit al);
    @(negedge clk);
    chk(cke == (m_mode != 1), $sformatf("cke %0b mode %0d", cke, m_mode));
    chk(rank_ready == (m_mode == 0), "rank_ready");
    chk(int'(state) == (m_mode == 0 ? int'(PD_STANDBY) : m_mode == 1 ? int'(PD_DOWN) : int'(PD_EXITING)), "state");
    chk(pd_enter == m_enter && pd_exit == m_exit, "pulses");
    timeout_expired = ex; req_pending = rq; pd_allowed = al;
    m_enter = 1'b0; m_exit = 1'b0;
    case (m_mode)
      0: if (ex && !rq && al) begin m_mode = 1; m_time = 0; m_enter = 1'b1; end
      1: if (rq && m_time >= TCKE - 1) begin m_mode = 2; m_time = 0; m_exit = 1'b1; end
         else m_time++;
      default: if (m_time >= TXP - 1) m_mode = 0; else m_time++;
    endcase
  endtask


  initial begin
    int k;
    rst_n = 1'b0; timeout_expired = 1'b0; req_pending = 1'b0; pd_allowed = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    m_mode = 0; m_time = 0; m_enter = 0; m_exit = 0;
    step(0, 0, 1);
    // Entry refused while a request is pending or entry is not allowed.
    repeat (5) step(1, 1, 1);
    repeat (5) step(1, 0, 0);
    chk(cke && rank_ready, "entered despite a pending request or veto");
    // Entry: condition in one cycle, CKE low in the next.
    step(1, 0, 1);
    step(0, 1, 1);                     // request already waiting
    chk(!cke && pd_enter, "CKE did not fall one cycle after the condition");
    k = 0;
    while (!cke && k < 50) begin step(0, 1, 1); k++; end
    chk(k == TCKE, $sformatf("CKE low for %0d cycles with a waiting request, want %0d", k, TCKE));
    chk(pd_exit, "no exit pulse with the CKE rise");
    k = 0;
    while (!rank_ready && k < 50) begin step(0, 0, 1); k++; end
    chk(k == TXP, $sformatf("rank_ready back after %0d cycles, want %0d", k, TXP));
    // Late request: CKE rises one cycle after it.
    step(1, 0, 1);
    repeat (20) step(0, 0, 1);
    chk(!cke, "left power-down without a request");
    step(0, 1, 1);
    step(0, 1, 1);
    chk(cke && pd_exit, "CKE not raised one cycle after a late request");
    repeat (TXP + 2) step(0, 0, 1);
    // Random phase against the model.
    for (int i = 0; i < 50000; i++)
      step($urandom_range(3) != 0, $urandom_range(9) == 0, $urandom_range(7) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
