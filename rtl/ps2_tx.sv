// ps2_tx -- host-to-keyboard transmitter for one PS/2 byte.
//
// The keyboard always generates the clock, so the host has to ask for it.
// The host drives a line low by setting its drive enable (clk_drive or
// data_drive) to 1; 0 releases the line to its pull-up. One transfer:
//   INHIBIT  hold Clock low for INHIBIT_CYC cycles (at least 100 us; at
//            least 2 cycles whatever the setting), which
//            also stops any transfer from the keyboard;
//   REQ      pull Data low too (the start bit) for one cycle, then release
//            Clock: the keyboard now clocks the byte in;
//   BITS     on each falling keyboard-clock edge put the next bit on Data:
//            data bits 0..7 (LSB first), odd parity, then the stop bit 1
//            (Data released). The keyboard reads each bit while Clock is
//            high;
//   ACK      at the eleventh falling edge the keyboard holds Data low to
//            acknowledge; ack_ok records whether it did;
//   RELEASE  wait until the keyboard has released both lines, then pulse
//            done for one cycle.
// The design calls for sending data to the keyboard and for the line
// driving convention used here (drive enable high pulls the line low);
// the transfer sequence itself follows the standard PS/2 host-to-device
// protocol and is this design's addition. There is no timeout: with no
// keyboard attached a transfer waits in BITS until reset.
//
// Interface: start (one cycle, while busy is 0) with din; ps2_clk/ps2_data
// are the synchronised line levels (input_reg). busy is high from start to
// done. Reset is synchronous, active high.
module ps2_tx #(
  parameter int unsigned INHIBIT_CYC = 2000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] din,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic       clk_drive,
  output logic       data_drive,
  output logic       busy,
  output logic       done,
  output logic       ack_ok
);

  typedef enum logic [2:0] {
    TX_IDLE, TX_INHIBIT, TX_REQ, TX_BITS, TX_ACK, TX_RELEASE
  } tx_state_t;

  localparam int unsigned INH = (INHIBIT_CYC > 1) ? INHIBIT_CYC : 2;
  localparam int unsigned CW  = $clog2(INH);

  tx_state_t     state;
  logic [CW-1:0] cnt;
  logic [3:0]    nbits;
  logic [9:0]    frame;   // {stop, parity, data[7:0]}, next bit in frame[0]
  logic          start_bit;
  logic          fall;

  one_shot u_edge (.clk(clk), .rst(rst), .ps2_clk(ps2_clk), .pulse(fall));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= TX_IDLE;
      cnt       <= '0;
      nbits     <= '0;
      frame     <= '1;
      start_bit <= 1'b0;
      ack_ok    <= 1'b0;
    end else begin
      unique case (state)
        TX_IDLE: if (start) begin
          frame  <= {1'b1, ~(^din), din};
          cnt    <= CW'(INH - 1);
          ack_ok <= 1'b0;
          state  <= TX_INHIBIT;
        end
        TX_INHIBIT: begin
          if (cnt == '0) begin
            start_bit <= 1'b1;
            state     <= TX_REQ;
          end else cnt <= cnt - 1'b1;
        end
        TX_REQ: begin
          nbits <= '0;
          state <= TX_BITS;
        end
        TX_BITS: if (fall) begin
          if (start_bit) start_bit <= 1'b0;
          else           frame     <= {1'b1, frame[9:1]};
          nbits <= nbits + 1'b1;
          if (nbits == 4'd9) state <= TX_ACK;
        end
        TX_ACK: if (fall) begin
          ack_ok <= !ps2_data;
          state  <= TX_RELEASE;
        end
        TX_RELEASE: if (ps2_clk && ps2_data) state <= TX_IDLE;
        default: state <= TX_IDLE;
      endcase
    end
  end

  assign clk_drive  = (state == TX_INHIBIT) || (state == TX_REQ);
  assign data_drive = (state == TX_REQ) ||
                      (state == TX_BITS && (start_bit || !frame[0]));
  assign busy       = (state != TX_IDLE);
  assign done       = (state == TX_RELEASE) && ps2_clk && ps2_data;

endmodule
