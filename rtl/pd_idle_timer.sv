// pd_idle_timer: per-rank idle time-out counter.
//
// Counts the cycles since the last command issued to a rank (or since the
// rank last left power-down) and raises `expired` once that count has
// reached the current time-out value `lambda`. A command restarts the count,
// as in the fixed time-out scheme that the adaptive scheme builds on. The
// count saturates instead of wrapping.
//
// Timing: `restart` in cycle t clears the count in cycle t+1; with no further
// restart the count is k in cycle t+1+k, and `expired` (combinational from the
// count) is first high in cycle t+1+lambda. Restart is synchronous,
// as is the active-low reset.
//
// Counting up and comparing with lambda (rather than loading lambda and
// counting down) is this design's choice: lambda can then change at an epoch
// boundary without disturbing a count in progress.
module pd_idle_timer #(
  parameter int unsigned LAMBDA_W = adpd_pkg::DEF_LAMBDA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                restart,
  input  logic [LAMBDA_W-1:0] lambda,
  output logic                expired
);

  localparam logic [LAMBDA_W-1:0] CNT_MAX = '1;

  logic [LAMBDA_W-1:0] idle_cycles;

  always_ff @(posedge clk) begin
    if (!rst_n || restart)
      idle_cycles <= '0;
    else if (idle_cycles != CNT_MAX)
      idle_cycles <= idle_cycles + 1'b1;
  end

  assign expired = (idle_cycles >= lambda);

endmodule
