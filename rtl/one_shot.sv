// one_shot -- falling-edge detector for the registered PS/2 clock.
//
// Produces PS2ClkPulse: high for exactly one system clock cycle each time
// ps2_clk goes from 1 to 0. The previous sample of ps2_clk is kept in a
// flip-flop and compared with the current one; the pulse is high in the
// cycle where the previous sample is 1 and the current one is 0, as in the
// design's timing diagram (the pulse follows the first system clock edge
// that sees PS2Clk low and lasts one clock period). The comparison with a
// held previous value is this design's choice of insides.
//
// Interface: ps2_clk must already be synchronous (see input_reg). Reset is
// synchronous, active high, and loads the idle level 1 so that reset never
// makes a pulse.
module one_shot (
  input  logic clk,
  input  logic rst,
  input  logic ps2_clk,
  output logic pulse
);

  logic prev;

  always_ff @(posedge clk) begin
    if (rst) prev <= 1'b1;
    else     prev <= ps2_clk;
  end

  assign pulse = prev & ~ps2_clk;

endmodule
