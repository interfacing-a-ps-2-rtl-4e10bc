// ps2_kbd_top_tb -- end-to-end test of the scan code display.
//
// A behavioural keyboard drives the PS/2 pins of the top level, run at a
// reduced scale so the test is short: the timer period is CLK_HZ/RATE_HZ =
// 3000 cycles, the FIFO holds 4 codes and the transmitter's clock inhibit
// lasts CLK_HZ/10000 = 30 cycles. The PS/2 wires are open-collector: each
// is low when the keyboard or the design's drive enable pulls it. The testbench keeps its own model
// of what the display must show: each good frame it sends enters a model
// FIFO of the same depth (or is counted as lost when the model is full);
// at every timer tick the model gives its oldest code, or nothing when
// empty. Frames are only started when they end well before the next tick,
// so model and design agree on ordering.
//
// Checked: three cycles after every tick the digits show the model's code,
// as both the byte and the two seven-segment patterns (from a lit-segment
// table of this testbench); the display never changes except one or two
// cycles after a tick; a frame_error pulse for every frame with a bad
// parity or stop bit; the drive enables ps2_clk_out/ps2_data_out stay 0;
// FULL is seen when the model is full. Caps Lock (58): each press must make
// the design send the keyboard ED and then an LED byte with bit 2 equal to
// the new caps_led, auto-repeat and release must send nothing, and the
// drive enables may only be active while such an update is expected. The
// keyboard model answers each received byte with FA, which is then
// displayed like any code. Mechanisms that must each happen at least once:
// a code buffered behind another, a tick skipped on an empty FIFO, a
// parity error, a stop-bit error, a stray clock edge in Idle, a code lost
// to a full FIFO, and a Caps Lock LED update in each direction.
module ps2_kbd_top_tb;
  localparam int CLK_HZ = 300_000, RATE_HZ = 100, DEPTH = 4, HALF = 10;
  localparam int PERIOD = CLK_HZ / RATE_HZ;
  localparam int FRAME_CYC = 23 * HALF + 10;

  logic clk = 0, rst;
  logic kclk, kdata, clk_out, data_out;
  logic [6:0] seg_hi, seg_lo;
  logic [7:0] code;
  logic full, empty, frame_error, caps_led;
  wire  clk_line  = kclk & ~clk_out;
  wire  data_line = kdata & ~data_out;

  int checks = 0, failures = 0;
  int cyc = 0;                 // cycles since reset release (first = 1)
  logic [7:0] model [$];
  logic [7:0] shown = 8'h00;
  int n_buffered = 0, n_skip = 0, n_perr = 0, n_serr = 0, n_stray = 0, n_lost = 0;
  int n_ferr = 0, n_full = 0, n_shown = 0;
  int n_caps_on = 0, n_caps_off = 0, n_replies = 0;
  bit in_caps = 0, exp_caps = 0;
  logic [7:0] host_bytes [$];

  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                        "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                        "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  logic [7:0] make_codes [26] = '{8'h1C, 8'h32, 8'h21, 8'h23, 8'h24, 8'h2B, 8'h34, 8'h33,
                                  8'h43, 8'h3B, 8'h42, 8'h4B, 8'h3A, 8'h31, 8'h44, 8'h4D,
                                  8'h15, 8'h2D, 8'h1B, 8'h2C, 8'h3C, 8'h2A, 8'h1D, 8'h22,
                                  8'h35, 8'h1A};

  ps2_device_model #(.HALF(HALF)) kbd (.clk(clk), .clk_line(clk_line), .data_line(data_line),
                                       .ps2_clk(kclk), .ps2_data(kdata));

  ps2_kbd_top #(.CLK_HZ(CLK_HZ), .RATE_HZ(RATE_HZ), .FIFO_DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .ps2_clk(clk_line), .ps2_data(data_line),
    .ps2_clk_out(clk_out), .ps2_data_out(data_out),
    .seg_hi(seg_hi), .seg_lo(seg_lo), .code(code),
    .fifo_full(full), .fifo_empty(empty), .frame_error(frame_error), .caps_led(caps_led));

  always #5 clk = ~clk;

  function automatic logic [6:0] mask(input string s);
    logic [6:0] m = '0;
    for (int i = 0; i < s.len(); i++) m[s[i] - "a"] = 1'b1;
    return m;
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @cycle %0d: %s", cyc, msg);
  endtask

  // Model of the display, stepped every cycle.
  logic [7:0] last_code = 8'h00;
  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      if (frame_error) n_ferr++;
      if (full) n_full++;
      if ((clk_out || data_out) && !in_caps) fail("drive enable asserted outside a Caps Lock update");
      // ticks at cyc = PERIOD, 2*PERIOD, ...
      if (cyc > 0 && cyc % PERIOD == 0) begin
        if (model.size() == 0) n_skip++;
        else begin
          if (model.size() > 1) n_buffered++;
          shown = model.pop_front();
          n_shown++;
        end
      end
      if (cyc > 0 && cyc % PERIOD == 3) begin
        checks++;
        if (code !== shown || seg_hi !== mask(glyph[shown[7:4]]) ||
            seg_lo !== mask(glyph[shown[3:0]]))
          fail($sformatf("display %h (%b %b), expected %h", code, seg_hi, seg_lo, shown));
      end
      if (code !== last_code && !(cyc % PERIOD inside {1, 2})) fail("display changed off-tick");
      last_code = code;
    end
  end

  // Wait until a whole frame fits before the next tick.
  task automatic wait_window();
    while ((PERIOD - (cyc % PERIOD)) < FRAME_CYC + 20 || (cyc % PERIOD) < 5) @(posedge clk);
  endtask

  task automatic send_good(input logic [7:0] c);
    wait_window();
    kbd.send_frame(c, 1'b0, 1'b0);
    if (model.size() < DEPTH) model.push_back(c);
    else n_lost++;
  endtask

  task automatic send_bad(input bit bad_parity);
    wait_window();
    kbd.send_frame(8'($urandom), bad_parity, !bad_parity);
    if (bad_parity) n_perr++; else n_serr++;
  endtask

  // Keyboard side of host transfers: receive a byte, answer FA.
  initial begin
    forever begin
      logic [7:0] b;
      bit ok;
      kbd.receive_frame(b, ok);
      if (!ok) fail("host frame with bad parity or stop bit");
      host_bytes.push_back(b);
      wait_window();
      kbd.send_frame(8'hFA, 1'b0, 1'b0);
      if (model.size() < DEPTH) model.push_back(8'hFA);
      else n_lost++;
      n_replies++;
    end
  end

  // Caps Lock press: the code itself, then an LED update (ED, LED byte).
  task automatic press_caps(input bit repeat_only);
    int r0;
    r0 = n_replies;
    if (!repeat_only) begin
      in_caps = 1;
      exp_caps = !exp_caps;
    end
    send_good(8'h58);
    if (!repeat_only) begin
      while (n_replies < r0 + 2) @(posedge clk);
      in_caps = 0;
      checks++;
      if (host_bytes.size() != 2 || host_bytes[0] != 8'hED ||
          host_bytes[1] != {5'b0, exp_caps, 2'b00})
        fail($sformatf("host sent %p for caps=%b", host_bytes, exp_caps));
      else if (exp_caps) n_caps_on++;
      else n_caps_off++;
      host_bytes.delete();
    end else begin
      repeat (200) @(posedge clk);
      checks++;
      if (host_bytes.size() != 0) fail("auto-repeat started an LED update");
    end
    checks++;
    if (caps_led !== exp_caps) fail("caps_led wrong");
  endtask

  task automatic drain();
    while (model.size() != 0) @(posedge clk);
    repeat (PERIOD + 10) @(posedge clk);
  endtask

  initial begin
    rst = 1;
    repeat (5) @(posedge clk);
    #1 rst = 0;
    // One empty tick first.
    repeat (PERIOD + 10) @(posedge clk);
    // Key A pressed and released: 1C, F0 1C, buffered behind each other.
    send_good(8'h1C);
    send_good(8'hF0);
    send_good(8'h1C);
    drain();
    // Errors and a stray edge, interleaved with good codes.
    send_bad(1'b1);
    send_good(8'h32);
    send_bad(1'b0);
    wait_window(); kbd.stray_edge(); n_stray++;
    send_good(8'h21);
    drain();
    // Overflow: six codes between two ticks into a four-deep FIFO.
    while ((cyc % PERIOD) != 10) @(posedge clk);
    for (int i = 0; i < 6; i++) send_good(make_codes[3 + i]);
    checks++;
    if (!full) fail("FIFO not full after burst");
    drain();
    // Caps Lock: press (on), auto-repeat, release, press (off), release.
    press_caps(1'b0);
    press_caps(1'b1);
    send_good(8'hF0); send_good(8'h58);
    drain();
    press_caps(1'b0);
    send_good(8'hF0); send_good(8'h58);
    drain();
    // Random typing: make and break codes of the sample, some errors.
    for (int k = 0; k < 40; k++) begin
      int kind;
      logic [7:0] c;
      kind = $urandom % 8;
      c = make_codes[$urandom % 26];
      if (kind == 0)      send_bad(1'b1);
      else if (kind == 1) send_bad(1'b0);
      else if (kind == 2) begin send_good(8'hF0); send_good(c); end
      else                send_good(c);
    end
    drain();
    checks++;
    if (n_ferr != n_perr + n_serr) fail($sformatf("frame errors %0d, sent %0d", n_ferr, n_perr + n_serr));
    $display("shown=%0d buffered=%0d empty_skips=%0d parity_err=%0d stop_err=%0d stray=%0d lost=%0d full_cycles=%0d caps_on=%0d caps_off=%0d",
             n_shown, n_buffered, n_skip, n_perr, n_serr, n_stray, n_lost, n_full, n_caps_on, n_caps_off);
    checks++; if (n_buffered == 0) fail("no code waited in the FIFO");
    checks++; if (n_skip == 0)     fail("no tick found the FIFO empty");
    checks++; if (n_perr == 0)     fail("no parity error");
    checks++; if (n_serr == 0)     fail("no stop-bit error");
    checks++; if (n_stray == 0)    fail("no stray clock edge");
    checks++; if (n_lost == 0)     fail("no code lost to a full FIFO");
    checks++; if (n_full == 0)     fail("FULL never seen");
    checks++; if (n_caps_on == 0)  fail("Caps Lock LED never turned on");
    checks++; if (n_caps_off == 0) fail("Caps Lock LED never turned off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
