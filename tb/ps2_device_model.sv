// ps2_device_model -- behavioural model of a PS/2 keyboard sending frames.
//
// Not synthesizable; used by the testbenches. The device owns the clock:
// for each bit it puts the bit on ps2_data, holds ps2_clk high for HALF
// system clock cycles (so data is valid HALF cycles before the falling
// edge), then drives ps2_clk low for HALF cycles. A frame is a start bit
// (0), eight data bits LSB first, an odd parity bit and a stop bit (1).
// At a 20 MHz system clock, HALF = 800 gives an 80 us PS/2 clock period,
// inside the 60-100 us range of the protocol. Lines idle high.
//
// ps2_clk/ps2_data are the device's own drives (1 = released); clk_line
// and data_line are the levels actually on the wires, which the host may
// pull low.
//
// Tasks: send_frame(code, bad_parity, bad_stop) sends one frame, with the
// parity bit inverted or the stop bit 0 on request; stray_edge() makes one
// clock pulse with data high while the line is idle; idle(n) waits n
// cycles with both lines high; receive_frame(code, ok) waits for the host
// to inhibit the clock and request to send (Clock released while Data is
// low), clocks in eight data bits, parity and stop bit, reading each while
// Clock is high, and acknowledges by holding Data low during an eleventh
// clock pulse (or not, with no_ack); ok reports odd parity and a stop bit
// of 1.
module ps2_device_model #(
  parameter int HALF = 20
) (
  input  logic clk,
  input  logic clk_line,
  input  logic data_line,
  output logic ps2_clk,
  output logic ps2_data
);

  initial begin
    ps2_clk  = 1'b1;
    ps2_data = 1'b1;
  end

  task automatic clock_bit(input logic b);
    ps2_data = b;
    repeat (HALF) @(posedge clk);
    ps2_clk = 1'b0;
    repeat (HALF) @(posedge clk);
    ps2_clk = 1'b1;
  endtask

  task automatic send_frame(input logic [7:0] code, input bit bad_parity = 1'b0,
                            input bit bad_stop = 1'b0);
    logic par;
    par = ~(^code);
    if (bad_parity) par = ~par;
    clock_bit(1'b0);
    for (int i = 0; i < 8; i++) clock_bit(code[i]);
    clock_bit(par);
    clock_bit(bad_stop ? 1'b0 : 1'b1);
    ps2_data = 1'b1;
    repeat (HALF) @(posedge clk);
  endtask

  task automatic stray_edge();
    clock_bit(1'b1);
    repeat (HALF) @(posedge clk);
  endtask

  task automatic receive_frame(output logic [7:0] code, output bit ok,
                               input bit no_ack = 1'b0);
    logic [9:0] bits;
    int low;
    // Host request: Clock held low by the host (not by this device), then
    // released with Data low.
    low = 0;
    while (low < 4) begin
      @(posedge clk);
      low = (clk_line === 1'b0 && ps2_clk === 1'b1) ? low + 1 : 0;
    end
    wait (clk_line === 1'b1);
    ok = (data_line === 1'b0);
    repeat (HALF) @(posedge clk);
    for (int i = 0; i < 10; i++) begin
      ps2_clk = 1'b0;
      repeat (HALF) @(posedge clk);
      ps2_clk = 1'b1;
      bits[i] = data_line;
      repeat (HALF) @(posedge clk);
    end
    // Acknowledge bit (Data left high when no_ack is set).
    ps2_data = no_ack;
    repeat (HALF / 2) @(posedge clk);
    ps2_clk = 1'b0;
    repeat (HALF) @(posedge clk);
    ps2_clk = 1'b1;
    repeat (HALF / 2) @(posedge clk);
    ps2_data = 1'b1;
    repeat (HALF) @(posedge clk);
    code = bits[7:0];
    ok = ok && (^bits[8:0]) && bits[9];
  endtask

  task automatic idle(input int n);
    ps2_clk  = 1'b1;
    ps2_data = 1'b1;
    repeat (n) @(posedge clk);
  endtask

endmodule
