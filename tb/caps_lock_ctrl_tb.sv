// caps_lock_ctrl_tb -- checks the Caps Lock LED controller on its own.
//
// The receiver is replaced by one-cycle rx_valid strobes and the
// transmitter by a responder that answers each tx_start with tx_done a
// random 5-40 cycles later (with tx_ack_ok as the test chooses). Every
// byte the controller asks to send is logged and compared with the
// expected order: set-LEDs command ED, the keyboard's acknowledge FA, then
// the LED byte with bit 2 equal to the Caps Lock state. Checked: a press
// toggles caps_led and starts one update; auto-repeat while held and the
// release (F0 58) do not; other keys do nothing; a reply other than FA or
// a transfer without line acknowledge abandons the update; presses in
// quick succession give one update each.
module caps_lock_ctrl_tb;
  logic clk = 0, rst, rx_valid, tx_done, tx_ack_ok, tx_start, caps_led;
  logic [7:0] rx_code, tx_byte;
  logic [7:0] sent [$];
  bit line_ack = 1;
  int checks = 0, failures = 0;

  caps_lock_ctrl dut (.clk(clk), .rst(rst), .rx_valid(rx_valid), .rx_code(rx_code),
                      .tx_done(tx_done), .tx_ack_ok(tx_ack_ok), .tx_start(tx_start),
                      .tx_byte(tx_byte), .caps_led(caps_led));

  always #5 clk = ~clk;

  // Transmitter stand-in.
  initial begin
    tx_done = 0; tx_ack_ok = 0;
    forever begin
      @(posedge clk);
      if (tx_start && !rst) begin
        sent.push_back(tx_byte);
        repeat (5 + $urandom % 36) @(posedge clk);
        #1 tx_done = 1; tx_ack_ok = line_ack;
        @(posedge clk);
        #1 tx_done = 0; tx_ack_ok = 0;
      end
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic rx(input logic [7:0] c);
    repeat (2 + $urandom % 10) @(posedge clk);
    #1 rx_valid = 1; rx_code = c;
    @(posedge clk);
    #1 rx_valid = 0; rx_code = 'x;
  endtask

  task automatic wait_sent(input int n);
    int t = 0;
    while (sent.size() < n && t < 1000) begin
      @(posedge clk);
      t++;
    end
    repeat (50) @(posedge clk);
  endtask

  task automatic expect_sent(input logic [7:0] e [$], input string what);
    chk(sent == e, $sformatf("%s: sent %p, expected %p", what, sent, e));
    sent.delete();
  endtask

  initial begin
    rst = 1; rx_valid = 0; rx_code = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    chk(!caps_led, "off after reset");
    // Press: full update.
    rx(8'h58); wait_sent(1); rx(8'hFA); wait_sent(2); rx(8'hFA);
    repeat (20) @(posedge clk);
    chk(caps_led, "on after first press");
    expect_sent('{8'hED, 8'h04}, "first press");
    // Auto-repeat and release: nothing.
    rx(8'h58); rx(8'h58); rx(8'hF0); rx(8'h58);
    repeat (100) @(posedge clk);
    chk(caps_led, "still on after repeat and release");
    expect_sent('{}, "repeat and release");
    // Other keys: nothing.
    rx(8'h1C); rx(8'hF0); rx(8'h1C); rx(8'hED); rx(8'hFA);
    repeat (100) @(posedge clk);
    expect_sent('{}, "other keys");
    // Second press: off.
    rx(8'h58); wait_sent(1); rx(8'hFA); wait_sent(2); rx(8'hFA);
    rx(8'hF0); rx(8'h58);
    repeat (20) @(posedge clk);
    chk(!caps_led, "off after second press");
    expect_sent('{8'hED, 8'h00}, "second press");
    // Keyboard answers FE (resend) instead of FA: update abandoned.
    rx(8'h58); wait_sent(1); rx(8'hFE);
    repeat (100) @(posedge clk);
    chk(caps_led, "toggled on third press");
    expect_sent('{8'hED}, "non-ack reply");
    rx(8'hF0); rx(8'h58);
    // No acknowledge bit on the line: abandoned after the command.
    line_ack = 0;
    rx(8'h58); wait_sent(1);
    repeat (100) @(posedge clk);
    expect_sent('{8'hED}, "no line ack");
    chk(!caps_led, "toggled off on fourth press");
    line_ack = 1;
    rx(8'hF0); rx(8'h58);
    // Press right after an update ends: a second update follows.
    rx(8'h58); wait_sent(1); rx(8'hFA); wait_sent(2); rx(8'hFA);
    rx(8'hF0); rx(8'h58); rx(8'h58);
    wait_sent(3); rx(8'hFA); wait_sent(4); rx(8'hFA);
    repeat (50) @(posedge clk);
    chk(!caps_led, "off after two more presses");
    expect_sent('{8'hED, 8'h04, 8'hED, 8'h00}, "back-to-back updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
