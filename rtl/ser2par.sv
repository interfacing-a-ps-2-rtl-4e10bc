// ser2par -- serial-to-parallel PS/2 receiver.
//
// Joins the control and data parts of the receiver: one_shot turns each
// falling edge of the registered PS2Clk into a one-cycle pulse, receiver_fsm
// decides which pulses shift a bit, shift_reg collects the eight data bits
// and the parity bit, and parity_checker tells the FSM whether the frame is
// good. When the stop bit arrives and the frame checks out, fifo_write is
// high for one cycle with the byte on scan_code. Grouping these four parts
// in one module is this design's choice.
//
// Timing: fifo_write comes in the cycle after the stop bit's falling edge
// is seen on ps2_clk (the one-shot's pulse cycle). scan_code is stable from
// the parity bit's shift until the next frame's first data bit.
// Interface: ps2_clk/ps2_data must be synchronous (input_reg). Reset is
// synchronous, active high.
module ser2par
  import smd098_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              ps2_clk,
  input  logic              ps2_data,
  output logic [CODE_W-1:0] scan_code,
  output logic              fifo_write,
  output logic              frame_error
);

  logic               clk_pulse;
  logic               shift_en;
  logic               parity_ok;
  logic [FRAME_W-1:0] frame;

  one_shot u_one_shot (
    .clk     (clk),
    .rst     (rst),
    .ps2_clk (ps2_clk),
    .pulse   (clk_pulse)
  );

  receiver_fsm u_fsm (
    .clk           (clk),
    .rst           (rst),
    .ps2_clk_pulse (clk_pulse),
    .ps2_data      (ps2_data),
    .parity_ok     (parity_ok),
    .shift_en      (shift_en),
    .fifo_write    (fifo_write),
    .frame_error   (frame_error)
  );

  shift_reg #(.WIDTH(FRAME_W)) u_shift (
    .clk      (clk),
    .rst      (rst),
    .shift_en (shift_en),
    .din      (ps2_data),
    .q        (frame)
  );

  parity_checker u_parity (
    .data      (frame[CODE_W-1:0]),
    .parity    (frame[CODE_W]),
    .parity_ok (parity_ok)
  );

  assign scan_code = frame[CODE_W-1:0];

endmodule
