// adpd_pd_manager: adaptive power-down (Ad-PD) manager for one DDR4 memory
// channel with NRANKS ranks.
//
// Only one rank of a channel moves data at a time, so the others should sit
// in power-down as much as possible without slowing the channel down. Each
// rank gets an idle time-out: after `lambda` cycles without a command, and
// with no request to it waiting in the controller, the rank drops CKE. The
// time-out is not fixed. A channel-wide epoch timer (20 us by default) closes
// an epoch; at that moment each rank looks at how often it had to leave
// power-down during the epoch (epsilon). Many exits mean it went down too
// eagerly, so lambda grows by DELTA; very few mean it waited too long, so
// lambda shrinks by DELTA; lambda stays within [LAMBDA_MIN, LAMBDA_MAX].
// Beyond a fixed time-out scheme this costs one exit counter per rank and one
// epoch register per channel.
//
// Structure: pd_epoch_timer (one), and per rank pd_idle_timer, pd_rank_fsm
// and adpd_lambda_ctrl. A rank's idle timer restarts on every command issued
// to it and when it leaves power-down.
//
// Interface, all per rank and sampled on the rising clock edge:
//   cmd_issued  - the scheduler issued a command to the rank this cycle
//   req_pending - the request queue holds a request (or refresh) for the rank
//   pd_allowed  - controller timing allows power-down entry (banks precharged)
//   cke         - CKE pin of the rank
//   rank_ready  - the scheduler may issue a command to the rank this cycle;
//                 low in power-down and for TXP cycles after CKE rises
//   pd_state, lambda, eps - standby state, current time-out and exits so far
//                 in this epoch, per rank (for power accounting and debug)
//   pd_enter, pd_exit - one-cycle pulses in the cycle CKE falls / rises
//   epoch_tick  - one-cycle pulse at the end of each epoch
// Timing: see pd_rank_fsm; a rank idle since cycle t, with nothing pending
// and entry allowed, has CKE low from cycle t+lambda+2 at the earliest.
//
// The scheme, its parameters and their defaults follow the published design
// (times converted at tCK = 0.833 ns and rounded up); the port list, the
// pd_allowed qualifier and the reset values are this design's choices.
module adpd_pd_manager
  import adpd_pkg::*;
#(
  parameter int unsigned NRANKS       = adpd_pkg::DEF_NRANKS,
  parameter int unsigned EPOCH_CYCLES = adpd_pkg::DEF_EPOCH_CYCLES,
  parameter int unsigned LAMBDA_MIN   = adpd_pkg::DEF_LAMBDA_MIN,
  parameter int unsigned LAMBDA_MAX   = adpd_pkg::DEF_LAMBDA_MAX,
  parameter int unsigned DELTA        = adpd_pkg::DEF_DELTA,
  parameter int unsigned THETA_LO     = adpd_pkg::DEF_THETA_LO,
  parameter int unsigned THETA_HI     = adpd_pkg::DEF_THETA_HI,
  parameter int unsigned TCKE         = adpd_pkg::DEF_TCKE,
  parameter int unsigned TXP          = adpd_pkg::DEF_TXP,
  parameter int unsigned LAMBDA_INIT  = LAMBDA_MIN,
  parameter int unsigned LAMBDA_W     = adpd_pkg::DEF_LAMBDA_W,
  parameter int unsigned EPS_W        = adpd_pkg::DEF_EPS_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NRANKS-1:0]   cmd_issued,
  input  logic [NRANKS-1:0]   req_pending,
  input  logic [NRANKS-1:0]   pd_allowed,
  output logic [NRANKS-1:0]   cke,
  output logic [NRANKS-1:0]   rank_ready,
  output pd_state_t           pd_state [NRANKS],
  output logic [LAMBDA_W-1:0] lambda   [NRANKS],
  output logic [EPS_W-1:0]    eps      [NRANKS],
  output logic [NRANKS-1:0]   pd_enter,
  output logic [NRANKS-1:0]   pd_exit,
  output logic                epoch_tick
);

  pd_epoch_timer #(.EPOCH_CYCLES(EPOCH_CYCLES)) u_epoch (
    .clk, .rst_n, .epoch_tick
  );

  for (genvar r = 0; r < NRANKS; r++) begin : g_rank
    logic expired;

    pd_idle_timer #(.LAMBDA_W(LAMBDA_W)) u_idle (
      .clk, .rst_n,
      .restart     (cmd_issued[r] || pd_exit[r]),
      .lambda      (lambda[r]),
      .expired     (expired)
    );

    pd_rank_fsm #(.TCKE(TCKE), .TXP(TXP)) u_fsm (
      .clk, .rst_n,
      .timeout_expired (expired),
      .req_pending     (req_pending[r]),
      .pd_allowed      (pd_allowed[r]),
      .cke             (cke[r]),
      .rank_ready      (rank_ready[r]),
      .state           (pd_state[r]),
      .pd_enter        (pd_enter[r]),
      .pd_exit         (pd_exit[r])
    );

    adpd_lambda_ctrl #(
      .LAMBDA_MIN (LAMBDA_MIN), .LAMBDA_MAX(LAMBDA_MAX), .DELTA(DELTA),
      .THETA_LO   (THETA_LO),   .THETA_HI  (THETA_HI),
      .LAMBDA_INIT(LAMBDA_INIT), .LAMBDA_W (LAMBDA_W),  .EPS_W(EPS_W)
    ) u_lambda (
      .clk, .rst_n,
      .pd_exit    (pd_exit[r]),
      .epoch_tick (epoch_tick),
      .lambda     (lambda[r]),
      .eps        (eps[r])
    );

    // The scheduler must not address a rank that is powered down or inside tXP.
    a_cmd_to_ready_rank: assert property (
      @(posedge clk) disable iff (!rst_n) cmd_issued[r] |-> rank_ready[r]
    ) else $error("command issued to rank %0d while it is not ready", r);
  end

endmodule
