// timer -- paces the digit display at about RATE_HZ updates per second.
//
// A down counter runs from CLK_HZ/RATE_HZ - 1 to 0 and reloads, giving a
// tick once per period (once a second at the design's 20 MHz clock and
// 1 Hz rate). On the tick cycle fifo_rd asks the FIFO for its oldest scan
// code, unless the FIFO is empty: the FIFO must not be read while empty,
// and such a tick is simply skipped, leaving the display as it is. One
// cycle later, when the FIFO's output has become valid, out_en loads the
// output register. Skipping (rather than waiting for data) and the counter
// are this design's choices.
//
// Interface: fifo_empty from the FIFO; fifo_rd to its RD_EN; out_en to the
// output register. fifo_rd depends combinationally on fifo_empty. Reset is
// synchronous, active high; the first tick comes CLK_HZ/RATE_HZ cycles
// after reset is released.
module timer #(
  parameter int unsigned CLK_HZ  = 20_000_000,
  parameter int unsigned RATE_HZ = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic fifo_empty,
  output logic fifo_rd,
  output logic out_en
);

  localparam int unsigned PERIOD = (CLK_HZ / RATE_HZ > 1) ? CLK_HZ / RATE_HZ : 2;
  localparam int unsigned W      = $clog2(PERIOD);

  logic [W-1:0] count;
  logic         tick;

  assign tick    = (count == '0);
  assign fifo_rd = tick && !fifo_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      count  <= W'(PERIOD - 1);
      out_en <= 1'b0;
    end else begin
      count  <= tick ? W'(PERIOD - 1) : count - 1'b1;
      out_en <= fifo_rd;
    end
  end

endmodule
