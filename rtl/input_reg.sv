// input_reg -- input register for the PS/2 Clock and Data pins.
//
// The keyboard drives PS2Clk and PS2Data with no relation to the 20 MHz system
// clock. Each line passes through STAGES flip-flops before any logic looks at
// it, so the one-shot and the receiver FSM see clean, synchronous levels.
// The design only calls for an input register; two stages (a synchroniser)
// is this design's choice. Reset loads 1, the idle level of a PS/2 line held
// up by its pull-up resistor.
//
// Interface: ps2_clk_in/ps2_data_in are the raw pins; ps2_clk_s/ps2_data_s
// are the registered copies, STAGES cycles later. Reset is synchronous,
// active high.
module input_reg #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic ps2_clk_in,
  input  logic ps2_data_in,
  output logic ps2_clk_s,
  output logic ps2_data_s
);

  // Element 0 is the pin itself; elements 1..STAGES are flip-flops.
  logic [STAGES:0] clk_q, data_q;

  assign clk_q[0]  = ps2_clk_in;
  assign data_q[0] = ps2_data_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_q[STAGES:1]  <= '1;
      data_q[STAGES:1] <= '1;
    end else begin
      clk_q[STAGES:1]  <= clk_q[STAGES-1:0];
      data_q[STAGES:1] <= data_q[STAGES-1:0];
    end
  end

  assign ps2_clk_s  = clk_q[STAGES];
  assign ps2_data_s = data_q[STAGES];

endmodule
