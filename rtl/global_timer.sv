// Global timer shared by all NPRC-CC schedulers.
//
// A prescaler divides the system clock by TICK_DIV and emits a one-cycle
// `tick`; `now` counts ticks since reset. Every scheduler advances its
// hyper-period position on the same tick, so all controllers step through
// their time slot tables in lock-step. The architecture names a global timer
// that the schedulers synchronise with but gives no rate: a 1 us tick
// (TICK_DIV = 100 at the 100 MHz platform clock) is this design's choice.
// Timing: the first tick is high in the TICK_DIV-th cycle after reset and
// every TICK_DIV cycles after that; `now` increments in the cycle after.
module global_timer #(
  parameter int unsigned TICK_DIV = 100,
  parameter int unsigned TIME_W   = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              tick,
  output logic [TIME_W-1:0] now
);
  localparam int unsigned CW = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;

  logic [CW-1:0] pre;

  assign tick = (pre == CW'(TICK_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0;
      now <= '0;
    end else begin
      pre <= tick ? '0 : pre + 1'b1;
      if (tick) now <= now + 1'b1;
    end
  end
endmodule
