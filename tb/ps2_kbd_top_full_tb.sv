// ps2_kbd_top_full_tb -- the top level at its default size, end to end.
//
// Runs the design as built: 20 MHz clock, one display update per second
// (20,000,000 cycles), 256-deep FIFO. The keyboard model uses an 80 us
// PS/2 clock period (HALF = 800 cycles). In the first second it sends the
// codes of key A pressed and released (1C, F0 1C), a frame with a bad
// parity bit, a Caps Lock press and release (58, F0 58), and then 256 more
// codes, so the FIFO fills and the last ones are lost. The Caps Lock press
// must make the design send the keyboard ED and 04 (Caps Lock LED on), each
// answered by the keyboard model with FA; the lines are open-collector. The test then watches three display updates: each must
// come exactly at the tick (display changes only one or two cycles after
// cycle 20,000,000 * k) and show 1C, F0, 1C in that order, as byte and as
// digit segments. It also checks FULL was seen, that one frame error was
// flagged, that caps_led is on and that the design drove the lines only
// during the LED update. About 60 million cycles.
module ps2_kbd_top_full_tb;
  localparam int PERIOD = 20_000_000, HALF = 800;

  logic clk = 0, rst;
  logic kclk, kdata, clk_out, data_out;
  logic [6:0] seg_hi, seg_lo;
  logic [7:0] code;
  logic full, empty, frame_error, caps_led;
  wire  clk_line  = kclk & ~clk_out;
  wire  data_line = kdata & ~data_out;
  logic [7:0] host_bytes [$];
  bit   in_caps = 0;
  int   n_replies = 0;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_ferr = 0, n_full = 0, n_changes = 0;
  logic [7:0] last_code = 8'h00;
  logic [7:0] expect_seq [3] = '{8'h1C, 8'hF0, 8'h1C};

  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                        "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                        "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  ps2_device_model #(.HALF(HALF)) kbd (.clk(clk), .clk_line(clk_line), .data_line(data_line),
                                       .ps2_clk(kclk), .ps2_data(kdata));

  ps2_kbd_top dut (
    .clk(clk), .rst(rst), .ps2_clk(clk_line), .ps2_data(data_line),
    .ps2_clk_out(clk_out), .ps2_data_out(data_out),
    .seg_hi(seg_hi), .seg_lo(seg_lo), .code(code),
    .fifo_full(full), .fifo_empty(empty), .frame_error(frame_error), .caps_led(caps_led));

  always #25 clk = ~clk;  // 20 MHz

  function automatic logic [6:0] mask(input string s);
    logic [6:0] m = '0;
    for (int i = 0; i < s.len(); i++) m[s[i] - "a"] = 1'b1;
    return m;
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @cycle %0d: %s", cyc, msg);
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      if (frame_error) n_ferr++;
      if (full) n_full++;
      if ((clk_out || data_out) && !in_caps) fail("drive enable asserted outside the LED update");
      if (cyc > PERIOD && cyc % PERIOD == 3) begin
        int k;
        k = cyc / PERIOD - 1;
        if (k < 3) begin
          checks++;
          if (code !== expect_seq[k] || seg_hi !== mask(glyph[expect_seq[k][7:4]]) ||
              seg_lo !== mask(glyph[expect_seq[k][3:0]]))
            fail($sformatf("update %0d shows %h, expected %h", k, code, expect_seq[k]));
        end
      end
      if (code !== last_code) begin
        n_changes++;
        if (!(cyc % PERIOD inside {1, 2})) fail("display changed off-tick");
      end
      last_code = code;
    end
  end

  // Keyboard side of host transfers: receive a byte, answer FA.
  initial begin
    forever begin
      logic [7:0] b;
      bit ok;
      kbd.receive_frame(b, ok);
      if (!ok) fail("host frame with bad parity or stop bit");
      host_bytes.push_back(b);
      kbd.send_frame(8'hFA, 1'b0, 1'b0);
      n_replies++;
    end
  end

  initial begin
    rst = 1;
    repeat (5) @(posedge clk);
    #1 rst = 0;
    kbd.idle(100);
    kbd.send_frame(8'h1C, 1'b0, 1'b0);
    kbd.send_frame(8'hF0, 1'b0, 1'b0);
    kbd.send_frame(8'h1C, 1'b0, 1'b0);
    kbd.send_frame(8'h32, 1'b1, 1'b0);
    in_caps = 1;
    kbd.send_frame(8'h58, 1'b0, 1'b0);
    wait (n_replies == 2);
    in_caps = 0;
    checks++;
    if (host_bytes.size() != 2 || host_bytes[0] != 8'hED || host_bytes[1] != 8'h04)
      fail($sformatf("host sent %p, expected ED 04", host_bytes));
    checks++;
    if (caps_led !== 1'b1) fail("caps_led not on");
    kbd.send_frame(8'hF0, 1'b0, 1'b0);
    kbd.send_frame(8'h58, 1'b0, 1'b0);
    // 256 more codes (58 replaced by 00 so no second Caps Lock press).
    for (int i = 0; i < 256; i++) kbd.send_frame((i == 'h58) ? 8'h00 : 8'(i), 1'b0, 1'b0);
    checks++;
    if (cyc >= PERIOD - 10) fail("burst did not finish before the first tick");
    checks++;
    if (!full) fail("FIFO not full after the burst");
    wait (cyc == 3 * PERIOD + 10);
    checks++;
    if (n_ferr != 1) fail($sformatf("%0d frame errors, expected 1", n_ferr));
    checks++;
    if (host_bytes.size() != 2 || caps_led !== 1'b1) fail("extra LED update or caps_led lost");
    checks++;
    if (n_changes != 3) fail($sformatf("%0d display changes, expected 3", n_changes));
    $display("full_cycles=%0d display_changes=%0d", n_full, n_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3_100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
