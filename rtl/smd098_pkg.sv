// smd098_pkg -- shared types, constants and functions of the PS/2 keyboard
// receiver.
//
// Holds the receiver FSM state type (one state per frame position, as in the
// ASM chart of the receiver: Idle, S0..S7, Parity, StopBit), the widths of a
// PS/2 frame, and hex_to_7seg, the function that acts as the display ROM.
// The ROM is written as a function because the design calls for the digit
// ROM to be a function call. The segment order and polarity are this
// design's choice: seg[0]=a ... seg[6]=g, 1 lights the segment, with the
// usual hex glyphs (lower-case b and d).
package smd098_pkg;

  // Scan code width and bits captured by the shift register (code + parity).
  localparam int unsigned CODE_W  = 8;
  localparam int unsigned FRAME_W = CODE_W + 1;

  // Receiver FSM states, in frame order.
  typedef enum logic [3:0] {
    ST_IDLE   = 4'd0,
    ST_S0     = 4'd1,
    ST_S1     = 4'd2,
    ST_S2     = 4'd3,
    ST_S3     = 4'd4,
    ST_S4     = 4'd5,
    ST_S5     = 4'd6,
    ST_S6     = 4'd7,
    ST_S7     = 4'd8,
    ST_PARITY = 4'd9,
    ST_STOP   = 4'd10
  } rx_state_t;

  // Seven-segment pattern of one hex digit, {g,f,e,d,c,b,a}, active high.
  function automatic logic [6:0] hex_to_7seg(input logic [3:0] h);
    unique case (h)
      4'h0: hex_to_7seg = 7'b0111111;
      4'h1: hex_to_7seg = 7'b0000110;
      4'h2: hex_to_7seg = 7'b1011011;
      4'h3: hex_to_7seg = 7'b1001111;
      4'h4: hex_to_7seg = 7'b1100110;
      4'h5: hex_to_7seg = 7'b1101101;
      4'h6: hex_to_7seg = 7'b1111101;
      4'h7: hex_to_7seg = 7'b0000111;
      4'h8: hex_to_7seg = 7'b1111111;
      4'h9: hex_to_7seg = 7'b1101111;
      4'hA: hex_to_7seg = 7'b1110111;
      4'hB: hex_to_7seg = 7'b1111100;
      4'hC: hex_to_7seg = 7'b0111001;
      4'hD: hex_to_7seg = 7'b1011110;
      4'hE: hex_to_7seg = 7'b1111001;
      4'hF: hex_to_7seg = 7'b1110001;
      default: hex_to_7seg = 7'b0000000;
    endcase
  endfunction

endpackage
