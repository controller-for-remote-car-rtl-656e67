// clock_divider: time base for the remote car starter.
//
// Counts DIV cycles of the board clock and emits a one-cycle `tick` pulse at
// the end of each count, so with the default DIV = 100000 and a 100 MHz clock
// the tick rate is 1 kHz, the rate the controller's counters are specified
// in (30000 ticks = 30 s, 120000 ticks = 2 min). The 1 kHz rate and the
// 100 MHz source are the design's; producing a clock-enable pulse instead of a
// divided clock is this implementation's choice: everything stays in one
// clock domain and no latch or gated clock is needed.
//
// Interface: clk, rst (synchronous, active high). Timing: `tick` is a
// registered output; it is high for the one cycle that follows the DIV-th
// rising edge after reset is released, and then once every DIV cycles.
module clock_divider #(
  parameter int unsigned DIV = 100000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [W-1:0] count;
  logic         wrap;

  assign wrap = (count == W'(DIV - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      tick  <= 1'b0;
    end else begin
      count <= wrap ? '0 : count + 1'b1;
      tick  <= wrap;
    end
  end

endmodule
