// adpd_lambda_ctrl: per-rank adaptive time-out (lambda) controller.
//
// This is the part that makes the power-down policy adaptive. During an
// epoch it counts the rank's power-down exits (epsilon). At the end of the
// epoch it judges the count:
//   epsilon > THETA_HI : the rank powers down too hastily, lambda += DELTA
//   epsilon < THETA_LO : the rank powers down too late,    lambda -= DELTA
//   otherwise          : lambda is kept
// and clamps the result to [LAMBDA_MIN, LAMBDA_MAX], then starts a new count.
// Keeping THETA_HI above THETA_LO leaves a dead band so that lambda does not
// oscillate; the clamp lets lambda return quickly when the access pattern
// changes. The rule, the thresholds, the step and the bounds follow the
// published scheme. A count equal to a threshold leaves lambda unchanged,
// the bounds are inclusive, lambda resets to LAMBDA_INIT (lambda_min), and
// an exit in the tick cycle is counted in the new epoch: these are this
// design's choices.
//
// Interface: `pd_exit` is a one-cycle pulse per power-down exit, `epoch_tick`
// a one-cycle pulse per epoch. `lambda` and `eps` are registers; a new lambda
// is visible the cycle after the tick. Synchronous active-low reset.
module adpd_lambda_ctrl #(
  parameter int unsigned LAMBDA_MIN  = adpd_pkg::DEF_LAMBDA_MIN,
  parameter int unsigned LAMBDA_MAX  = adpd_pkg::DEF_LAMBDA_MAX,
  parameter int unsigned DELTA       = adpd_pkg::DEF_DELTA,
  parameter int unsigned THETA_LO    = adpd_pkg::DEF_THETA_LO,
  parameter int unsigned THETA_HI    = adpd_pkg::DEF_THETA_HI,
  parameter int unsigned LAMBDA_INIT = LAMBDA_MIN,
  parameter int unsigned LAMBDA_W    = adpd_pkg::DEF_LAMBDA_W,
  parameter int unsigned EPS_W       = adpd_pkg::DEF_EPS_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                pd_exit,
  input  logic                epoch_tick,
  output logic [LAMBDA_W-1:0] lambda,
  output logic [EPS_W-1:0]    eps
);

  // One bit of headroom so that lambda + DELTA cannot overflow before the
  // clamp; after the clamp the top bit is always zero and is dropped.
  localparam int unsigned SUM_W = LAMBDA_W + 1;
  localparam logic [SUM_W-1:0] L_MIN = SUM_W'(LAMBDA_MIN);
  localparam logic [SUM_W-1:0] L_MAX = SUM_W'(LAMBDA_MAX);
  localparam logic [SUM_W-1:0] STEP  = SUM_W'(DELTA);
  localparam logic [EPS_W-1:0] T_LO  = EPS_W'(THETA_LO);
  localparam logic [EPS_W-1:0] T_HI  = EPS_W'(THETA_HI);
  localparam logic [EPS_W-1:0] EPS_MAX = '1;

  logic [SUM_W-1:0] cur, up, down, lambda_next;

  always_comb begin
    cur  = {1'b0, lambda};
    up   = cur + STEP;
    down = (cur > L_MIN + STEP) ? cur - STEP : L_MIN;
    if (eps > T_HI)
      lambda_next = (up > L_MAX) ? L_MAX : up;
    else if (eps < T_LO)
      lambda_next = down;
    else
      lambda_next = cur;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lambda <= LAMBDA_W'(LAMBDA_INIT);
      eps    <= '0;
    end else if (epoch_tick) begin
      lambda <= lambda_next[LAMBDA_W-1:0];
      eps    <= pd_exit ? EPS_W'(1) : '0;
    end else if (pd_exit && eps != EPS_MAX) begin
      eps    <= eps + 1'b1;
    end
  end

  initial begin
    assert (LAMBDA_MIN <= LAMBDA_MAX) else $error("LAMBDA_MIN above LAMBDA_MAX");
    assert (THETA_LO <= THETA_HI) else $error("THETA_LO above THETA_HI");
    assert (LAMBDA_MAX < (1 << LAMBDA_W)) else $error("LAMBDA_W too narrow");
  end

endmodule
