// shift_reg -- serial-in, parallel-out register for one PS/2 frame.
//
// On every cycle with shift_en high the register moves one place towards
// bit 0 and takes din into its top bit. The keyboard sends the eight data
// bits least significant first and then the parity bit, so after the nine
// shifts of a frame q[7:0] holds the scan code and q[8] the parity bit --
// the register then "contains the scan code and the parity bit", as the
// design requires when the FSM reaches its stop-bit state. The shift
// direction and the clear on reset are this design's choices.
//
// Interface: shift_en comes from the receiver FSM (one cycle per bit);
// din is the registered PS2Data. Reset is synchronous, active high.
module shift_reg #(
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             shift_en,
  input  logic             din,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)           q <= '0;
    else if (shift_en) q <= {din, q[WIDTH-1:1]};
  end

endmodule
