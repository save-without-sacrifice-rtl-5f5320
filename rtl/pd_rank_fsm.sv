// pd_rank_fsm: per-rank clock-enable (CKE) state machine for precharge
// power-down.
//
// The rank leaves precharge standby (2N) for precharge power-down (2P) when
// its idle time-out has expired, no request to it is pending in the
// controller and the controller's timing permits entry (`pd_allowed`: all
// banks precharged, nothing in flight). Once down it stays at least TCKE
// cycles. When a request for the rank shows up (and TCKE has passed) CKE is
// raised; the rank then takes no command for TXP cycles, after which it is
// back in standby. The entry rule (time-out and no pending request) and the
// tCKE/tXP rules follow DDR4; exit on a pending request, the `pd_allowed`
// input and the encoding are this design's choices.
//
//   state       cke  rank_ready
//   PD_STANDBY   1     1
//   PD_DOWN      0     0
//   PD_EXITING   1     0        (TXP cycles)
//
// Timing: if the entry condition holds in cycle t, CKE is low from cycle t+1
// and `pd_enter` is high in t+1. The earliest CKE rise is TCKE cycles later;
// `pd_exit` is high in the first cycle of CKE high (cycle x) and
// `rank_ready` returns in cycle x+TXP. All outputs come from registers.
// Synchronous active-low reset into PD_STANDBY.
module pd_rank_fsm
  import adpd_pkg::*;
#(
  parameter int unsigned TCKE = adpd_pkg::DEF_TCKE,
  parameter int unsigned TXP  = adpd_pkg::DEF_TXP
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      timeout_expired,
  input  logic      req_pending,
  input  logic      pd_allowed,
  output logic      cke,
  output logic      rank_ready,
  output pd_state_t state,
  output logic      pd_enter,
  output logic      pd_exit
);

  localparam int unsigned TMAX  = (TCKE > TXP) ? TCKE : TXP;
  localparam int unsigned CNT_W = $clog2(TMAX + 1);
  localparam logic [CNT_W-1:0] TCKE_LOAD = CNT_W'((TCKE > 0) ? TCKE - 1 : 0);
  localparam logic [CNT_W-1:0] TXP_LOAD  = CNT_W'((TXP  > 0) ? TXP  - 1 : 0);

  pd_state_t        state_next;
  logic [CNT_W-1:0] cnt, cnt_next;

  always_comb begin
    state_next = state;
    cnt_next   = (cnt != '0) ? cnt - 1'b1 : cnt;
    unique case (state)
      PD_STANDBY:
        if (timeout_expired && !req_pending && pd_allowed) begin
          state_next = PD_DOWN;
          cnt_next   = TCKE_LOAD;
        end
      PD_DOWN:
        if (req_pending && cnt == '0) begin
          state_next = PD_EXITING;
          cnt_next   = TXP_LOAD;
        end
      PD_EXITING:
        if (cnt == '0)
          state_next = PD_STANDBY;
      default:
        state_next = PD_STANDBY;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= PD_STANDBY;
      cnt      <= '0;
      pd_enter <= 1'b0;
      pd_exit  <= 1'b0;
    end else begin
      state    <= state_next;
      cnt      <= cnt_next;
      pd_enter <= (state == PD_STANDBY) && (state_next == PD_DOWN);
      pd_exit  <= (state == PD_DOWN) && (state_next == PD_EXITING);
    end
  end

  assign cke        = (state != PD_DOWN);
  assign rank_ready = (state == PD_STANDBY);

endmodule
