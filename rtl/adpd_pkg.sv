// adpd_pkg: types and default constants shared by the adaptive power-down
// (Ad-PD) manager.
//
// All times are in cycles of the memory controller's command clock. The
// defaults assume DDR4-2400, tCK = 0.833 ns, and are the rounded-up cycle
// counts of the published settings: epoch 20 us, lambda_min 30 ns,
// lambda_max 2 us, Delta 10 ns, tCKE 5 ns, tXP 6 ns. The thresholds
// theta_lo = 2 and theta_hi = 5 are exit counts. The reset value of lambda
// and the register widths are this design's own choices.
package adpd_pkg;

  // Standby state of a rank as seen by the controller.
  //   PD_STANDBY : CKE high, rank can take commands (precharge standby, "2N")
  //   PD_DOWN    : CKE low, precharge power-down ("2P")
  //   PD_EXITING : CKE high again, waiting tXP before the first command
  typedef enum logic [1:0] {
    PD_STANDBY = 2'd0,
    PD_DOWN    = 2'd1,
    PD_EXITING = 2'd2
  } pd_state_t;

  localparam int unsigned DEF_NRANKS       = 8;
  localparam int unsigned DEF_EPOCH_CYCLES = 24000; // 20 us
  localparam int unsigned DEF_LAMBDA_MIN   = 36;    // 30 ns
  localparam int unsigned DEF_LAMBDA_MAX   = 2400;  // 2 us
  localparam int unsigned DEF_DELTA        = 12;    // 10 ns
  localparam int unsigned DEF_THETA_LO     = 2;
  localparam int unsigned DEF_THETA_HI     = 5;
  localparam int unsigned DEF_TCKE         = 6;     // 5 ns
  localparam int unsigned DEF_TXP          = 8;     // 6 ns -> 7.2, rounded up
  localparam int unsigned DEF_LAMBDA_W     = 12;
  localparam int unsigned DEF_EPS_W        = 8;

endpackage
