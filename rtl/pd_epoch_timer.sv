// pd_epoch_timer: the per-channel epoch register of the adaptive power-down
// scheme.
//
// A free-running counter that emits `epoch_tick` for one cycle at the end of
// every epoch of EPOCH_CYCLES cycles (20 us at DDR4-2400 by default). At the
// tick each rank's lambda controller retires its exit count and picks the
// time-out for the next epoch.
//
// Timing: after reset is released in cycle 0, the tick is high in cycles
// EPOCH_CYCLES-1, 2*EPOCH_CYCLES-1, ... . The reset is synchronous, active low.
module pd_epoch_timer #(
  parameter int unsigned EPOCH_CYCLES = adpd_pkg::DEF_EPOCH_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  output logic epoch_tick
);

  localparam int unsigned CNT_W = (EPOCH_CYCLES > 1) ? $clog2(EPOCH_CYCLES) : 1;
  localparam logic [CNT_W-1:0] LAST = CNT_W'(EPOCH_CYCLES - 1);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n || epoch_tick)
      cnt <= '0;
    else
      cnt <= cnt + 1'b1;
  end

  assign epoch_tick = (cnt == LAST);

endmodule
