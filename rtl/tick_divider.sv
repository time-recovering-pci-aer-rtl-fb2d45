// tick_divider - programmable time base for the event timers.
//
// The published design states that the clock cycle used to count event delays can
// be configured and that the counters of both FIFO paths can be clock
// divided. This module is the simplest circuit doing that: a down counter
// reloaded with `div` that emits a one-clock `tick` pulse every div+1
// clocks (div = 0 gives a tick on every clock). While `en` is low the counter
// is held at its reload value, so the first tick after enabling comes div+1
// clocks later. A new `div` takes effect at the next reload.
module tick_divider #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [DIV_W-1:0] div,   // tick period minus one, in clocks
  output logic             tick
);
  logic [DIV_W-1:0] cnt;

  assign tick = en && (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (!en)        cnt <= div;
    else if (cnt == '0)  cnt <= div;
    else                 cnt <= cnt - 1'b1;
  end
endmodule
