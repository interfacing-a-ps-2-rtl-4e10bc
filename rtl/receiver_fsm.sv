// receiver_fsm -- controller that frames a PS/2 transfer.
//
// The one-shot reports every falling edge of the keyboard clock, the moment
// PS2Data is valid. This FSM decides which of those edges carry data:
//   Idle     : a pulse with PS2Data = 0 is a start bit -> S0; a pulse with
//              PS2Data = 1 is ignored.
//   S0..S7   : wait for a pulse; on it raise shift_en for that cycle (data
//              bit 0..7 enters the shift register) and move on.
//   Parity   : the same for the parity bit, then StopBit.
//   StopBit  : on the next pulse, if PS2Data = 1 (stop bit) and parity_ok,
//              raise fifo_write for that cycle; in every case go to Idle.
// shift_en and fifo_write are Mealy outputs, high in the cycle of the pulse;
// the state changes at the end of that cycle. The states follow the
// design's ASM chart one for one (the design allows a counter instead).
// Two points are read against that chart: the start bit is PS2Data = 0, as
// the protocol defines it, and the frame is written when parity_ok = 1
// (the checker outputs 1 for "no parity error"). A frame with a bad stop
// bit or parity is dropped without a write; frame_error, this design's own
// addition, marks that cycle. The FIFO's full flag is not consulted, as in
// the design: codes that arrive while it is full are lost.
//
// Interface: ps2_clk_pulse from one_shot, ps2_data registered, parity_ok
// from parity_checker. Reset is synchronous, active high, and enters Idle.
module receiver_fsm
  import smd098_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic ps2_clk_pulse,
  input  logic ps2_data,
  input  logic parity_ok,
  output logic shift_en,
  output logic fifo_write,
  output logic frame_error
);

  rx_state_t state, state_next;

  always_ff @(posedge clk) begin
    if (rst) state <= ST_IDLE;
    else     state <= state_next;
  end

  always_comb begin
    state_next  = state;
    shift_en    = 1'b0;
    fifo_write  = 1'b0;
    frame_error = 1'b0;
    if (ps2_clk_pulse) begin
      unique case (state)
        ST_IDLE: begin
          if (!ps2_data) state_next = ST_S0;
        end
        ST_S0, ST_S1, ST_S2, ST_S3, ST_S4, ST_S5, ST_S6, ST_S7: begin
          shift_en   = 1'b1;
          state_next = rx_state_t'(state + 4'd1);
        end
        ST_PARITY: begin
          shift_en   = 1'b1;
          state_next = ST_STOP;
        end
        ST_STOP: begin
          if (ps2_data && parity_ok) fifo_write  = 1'b1;
          else                       frame_error = 1'b1;
          state_next = ST_IDLE;
        end
        default: state_next = ST_IDLE;
      endcase
    end
  end

  // Outputs are mutually exclusive and only appear on a clock pulse.
  a_onehot_out: assert property (@(posedge clk) disable iff (rst)
    $onehot0({shift_en, fifo_write, frame_error}));
  a_pulse_only: assert property (@(posedge clk) disable iff (rst)
    (shift_en || fifo_write || frame_error) |-> ps2_clk_pulse);

endmodule
