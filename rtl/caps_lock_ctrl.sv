// caps_lock_ctrl -- toggles the keyboard's Caps Lock LED on each press of
// the Caps Lock key.
//
// Watches every good byte the receiver delivers (rx_valid with rx_code).
// It follows the make/break convention of scan code set 2: a byte F0 marks
// the next code as a release. A Caps Lock make code (CAPS_CODE) while the
// key is not already held toggles caps_led; the keyboard's auto-repeat
// (more make codes while held) does not toggle again, and the release
// clears "held". Each toggle schedules an LED update, which sends two
// bytes through ps2_tx, each answered by the keyboard with an
// acknowledge byte (ACK_CODE) that arrives through the receiver:
//   CMD_LEDS (set-LEDs command) -> wait ACK -> {5'b0, caps_led, 2'b00}
//   (Caps Lock is bit 2 of the LED byte; Num and Scroll Lock stay off)
//   -> wait ACK.
// A transfer the keyboard did not acknowledge on the line, or a reply that
// is not ACK_CODE, abandons the update; a toggle that happens during an
// update is sent by a following update. The design asks only for the LED
// to follow the key; the command byte, the LED bit, the acknowledge code
// and the Caps Lock code are those of the standard PS/2 keyboard and are
// this design's additions.
//
// Interface: tx_start/tx_byte to ps2_tx; tx_done/tx_ack_ok back from it.
// Reset is synchronous,
// active high, and turns caps_led off.
module caps_lock_ctrl #(
  parameter logic [7:0] CAPS_CODE  = 8'h58,
  parameter logic [7:0] BREAK_CODE = 8'hF0,
  parameter logic [7:0] CMD_LEDS   = 8'hED,
  parameter logic [7:0] ACK_CODE   = 8'hFA
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx_valid,
  input  logic [7:0] rx_code,
  input  logic       tx_done,
  input  logic       tx_ack_ok,
  output logic       tx_start,
  output logic [7:0] tx_byte,
  output logic       caps_led
);

  typedef enum logic [2:0] {
    C_IDLE, C_CMD_START, C_CMD_WAIT, C_CMD_ACK, C_LED_START, C_LED_WAIT, C_LED_ACK
  } caps_state_t;

  caps_state_t state;
  logic        brk, held, pending;

  // Key tracking, in every state.
  always_ff @(posedge clk) begin
    if (rst) begin
      brk      <= 1'b0;
      held     <= 1'b0;
      caps_led <= 1'b0;
      pending  <= 1'b0;
    end else begin
      if (rx_valid) begin
        if (rx_code == BREAK_CODE) brk <= 1'b1;
        else begin
          brk <= 1'b0;
          if (rx_code == CAPS_CODE) begin
            if (brk) held <= 1'b0;
            else if (!held) begin
              held     <= 1'b1;
              caps_led <= ~caps_led;
              pending  <= 1'b1;
            end
          end
        end
      end
      if (state == C_IDLE && pending) pending <= 1'b0;
    end
  end

  // LED update sequence.
  always_ff @(posedge clk) begin
    if (rst) state <= C_IDLE;
    else begin
      unique case (state)
        C_IDLE:      if (pending) state <= C_CMD_START;
        C_CMD_START: state <= C_CMD_WAIT;
        C_CMD_WAIT:  if (tx_done) state <= tx_ack_ok ? C_CMD_ACK : C_IDLE;
        C_CMD_ACK:   if (rx_valid) state <= (rx_code == ACK_CODE) ? C_LED_START : C_IDLE;
        C_LED_START: state <= C_LED_WAIT;
        C_LED_WAIT:  if (tx_done) state <= tx_ack_ok ? C_LED_ACK : C_IDLE;
        C_LED_ACK:   if (rx_valid) state <= C_IDLE;
        default:     state <= C_IDLE;
      endcase
    end
  end

  assign tx_start = (state == C_CMD_START) || (state == C_LED_START);
  assign tx_byte  = (state == C_LED_START) ? {5'b0, caps_led, 2'b00} : CMD_LEDS;

endmodule
