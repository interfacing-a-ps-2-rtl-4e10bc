// ps2_kbd_top -- PS/2 keyboard scan code display with Caps Lock LED.
//
// Receives the scan codes a PS/2 keyboard sends and shows them, one per
// second, as two hex digits. Data path and control path:
//   input_reg   synchronises the PS2Clk and PS2Data pins to clk;
//   ser2par     finds each falling keyboard-clock edge, frames start bit,
//               eight data bits (LSB first), odd parity and stop bit, and
//               emits a good byte with a one-cycle write strobe;
//   sync_fifo   buffers up to FIFO_DEPTH codes (keys can arrive much faster
//               than the display shows them); writes while full are lost;
//   timer       reads one code every CLK_HZ/RATE_HZ cycles if there is one;
//   output_reg  loads that code one cycle after the read and drives the
//               digit ROMs.
// With CAPS_LOCK = 1 (the default) the design also talks back to the
// keyboard: caps_lock_ctrl toggles caps_led on each Caps Lock press and has
// ps2_tx send the keyboard the command that lights or clears its Caps Lock
// LED. While ps2_tx owns the lines the receiver is held in reset, so the
// clock edges of the host's own transfer are not taken for a frame; the
// keyboard's acknowledge bytes are received (and displayed) like any code.
// With CAPS_LOCK = 0 the host only listens: the drive enables ps2_clk_out
// and ps2_data_out (1 pulls the line low) stay 0 and caps_led stays 0.
//
// Defaults follow the design: 20 MHz clock, about 1 Hz display rate, an
// 8 x 256 FIFO. The module name, the single synchronous active-high reset
// (also clearing the FIFO), the observation outputs code, fifo_full,
// fifo_empty and frame_error, and the 100 us inhibit time of the
// transmitter (CLK_HZ/10000 cycles) are this design's choices.
//
// Latency: a code is in the FIFO about 2-3 clk cycles after the stop bit's
// falling clock edge on the pin; it reaches the digits at the first timer
// tick after that, plus two cycles.
module ps2_kbd_top
  import smd098_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 20_000_000,
  parameter int unsigned RATE_HZ    = 1,
  parameter int unsigned FIFO_DEPTH = 256,
  parameter bit          CAPS_LOCK  = 1'b1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ps2_clk,
  input  logic              ps2_data,
  output logic              ps2_clk_out,
  output logic              ps2_data_out,
  output logic [6:0]        seg_hi,
  output logic [6:0]        seg_lo,
  output logic [CODE_W-1:0] code,
  output logic              fifo_full,
  output logic              fifo_empty,
  output logic              frame_error,
  output logic              caps_led
);

  logic              ps2_clk_s, ps2_data_s;
  logic [CODE_W-1:0] rx_code, fifo_dout;
  logic              fifo_wr, fifo_rd, out_en;
  logic              tx_busy, rx_rst;

  assign rx_rst = rst || tx_busy;

  input_reg u_in (
    .clk         (clk),
    .rst         (rst),
    .ps2_clk_in  (ps2_clk),
    .ps2_data_in (ps2_data),
    .ps2_clk_s   (ps2_clk_s),
    .ps2_data_s  (ps2_data_s)
  );

  ser2par u_rx (
    .clk         (clk),
    .rst         (rx_rst),
    .ps2_clk     (ps2_clk_s),
    .ps2_data    (ps2_data_s),
    .scan_code   (rx_code),
    .fifo_write  (fifo_wr),
    .frame_error (frame_error)
  );

  sync_fifo #(.WIDTH(CODE_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk   (clk),
    .sinit (rst),
    .din   (rx_code),
    .wr_en (fifo_wr),
    .rd_en (fifo_rd),
    .dout  (fifo_dout),
    .full  (fifo_full),
    .empty (fifo_empty)
  );

  timer #(.CLK_HZ(CLK_HZ), .RATE_HZ(RATE_HZ)) u_timer (
    .clk        (clk),
    .rst        (rst),
    .fifo_empty (fifo_empty),
    .fifo_rd    (fifo_rd),
    .out_en     (out_en)
  );

  output_reg u_out (
    .clk    (clk),
    .rst    (rst),
    .en     (out_en),
    .d      (fifo_dout),
    .code   (code),
    .seg_hi (seg_hi),
    .seg_lo (seg_lo)
  );

  if (CAPS_LOCK) begin : g_caps
    logic       tx_start, tx_done, tx_ack_ok;
    logic [7:0] tx_byte;

    caps_lock_ctrl u_caps (
      .clk       (clk),
      .rst       (rst),
      .rx_valid  (fifo_wr),
      .rx_code   (rx_code),
      .tx_done   (tx_done),
      .tx_ack_ok (tx_ack_ok),
      .tx_start  (tx_start),
      .tx_byte   (tx_byte),
      .caps_led  (caps_led)
    );

    ps2_tx #(.INHIBIT_CYC(CLK_HZ / 10_000)) u_tx (
      .clk        (clk),
      .rst        (rst),
      .start      (tx_start),
      .din        (tx_byte),
      .ps2_clk    (ps2_clk_s),
      .ps2_data   (ps2_data_s),
      .clk_drive  (ps2_clk_out),
      .data_drive (ps2_data_out),
      .busy       (tx_busy),
      .done       (tx_done),
      .ack_ok     (tx_ack_ok)
    );
  end else begin : g_listen_only
    assign ps2_clk_out  = 1'b0;
    assign ps2_data_out = 1'b0;
    assign tx_busy      = 1'b0;
    assign caps_led     = 1'b0;
  end

endmodule
