// ps2_kbd_typing_tb -- types the alphabet through the whole design.
//
// Every key A-Z is pressed and released (make code, then F0 and the make
// code), 78 codes in all, sent back to back by the keyboard model at real
// PS/2 timing on a 20 MHz system clock: first with the slowest keyboard
// clock (100 us period, HALF = 1000 cycles), then with the fastest (60 us,
// HALF = 600). The FIFO has its full 256 entries, so nothing may be lost.
// Only the display rate is raised, to 200 updates per second, to keep the
// run short. The testbench logs every change of the displayed byte and
// requires the exact sequence typed, with matching segment patterns, and
// no frame errors. The design runs in its receive-only configuration
// (CAPS_LOCK = 0): the drive enables and caps_led must stay 0.
module ps2_kbd_typing_tb;
  localparam int RATE_HZ = 200;

  logic clk = 0, rst;
  logic kclk_slow, kdata_slow, kclk_fast, kdata_fast;
  logic clk_out, data_out;
  logic [6:0] seg_hi, seg_lo;
  logic [7:0] code;
  logic full, empty, frame_error, caps_led;
  bit   use_fast = 0;
  wire  kclk  = use_fast ? kclk_fast  : kclk_slow;
  wire  kdata = use_fast ? kdata_fast : kdata_slow;
  wire  clk_line  = kclk & ~clk_out;
  wire  data_line = kdata & ~data_out;

  int checks = 0, failures = 0, n_ferr = 0;
  logic [7:0] typed [$];
  logic [7:0] seen [$];
  logic [7:0] last_code = 8'h00;

  logic [7:0] make_codes [26] = '{8'h1C, 8'h32, 8'h21, 8'h23, 8'h24, 8'h2B, 8'h34, 8'h33,
                                  8'h43, 8'h3B, 8'h42, 8'h4B, 8'h3A, 8'h31, 8'h44, 8'h4D,
                                  8'h15, 8'h2D, 8'h1B, 8'h2C, 8'h3C, 8'h2A, 8'h1D, 8'h22,
                                  8'h35, 8'h1A};

  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                        "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                        "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  ps2_device_model #(.HALF(1000)) kbd_slow (.clk(clk), .clk_line(clk_line), .data_line(data_line),
                                            .ps2_clk(kclk_slow), .ps2_data(kdata_slow));
  ps2_device_model #(.HALF(600))  kbd_fast (.clk(clk), .clk_line(clk_line), .data_line(data_line),
                                            .ps2_clk(kclk_fast), .ps2_data(kdata_fast));

  ps2_kbd_top #(.RATE_HZ(RATE_HZ), .CAPS_LOCK(1'b0)) dut (
    .clk(clk), .rst(rst), .ps2_clk(clk_line), .ps2_data(data_line),
    .ps2_clk_out(clk_out), .ps2_data_out(data_out),
    .seg_hi(seg_hi), .seg_lo(seg_lo), .code(code),
    .fifo_full(full), .fifo_empty(empty), .frame_error(frame_error), .caps_led(caps_led));

  always #25 clk = ~clk;

  function automatic logic [6:0] mask(input string s);
    logic [6:0] m = '0;
    for (int i = 0; i < s.len(); i++) m[s[i] - "a"] = 1'b1;
    return m;
  endfunction

  always @(posedge clk) if (!rst) begin
    if (frame_error) n_ferr++;
    if (clk_out || data_out || caps_led) begin
      failures++;
      $display("FAIL drive enable or caps_led asserted");
    end
    if (code !== last_code) begin
      seen.push_back(code);
      checks++;
      if (seg_hi !== mask(glyph[code[7:4]]) || seg_lo !== mask(glyph[code[3:0]])) begin
        failures++;
        $display("FAIL segments for %h: %b %b", code, seg_hi, seg_lo);
      end
    end
    last_code = code;
  end

  task automatic type_key(input logic [7:0] c);
    typed.push_back(c); typed.push_back(8'hF0); typed.push_back(c);
    if (use_fast) begin
      kbd_fast.send_frame(c); kbd_fast.send_frame(8'hF0); kbd_fast.send_frame(c);
    end else begin
      kbd_slow.send_frame(c); kbd_slow.send_frame(8'hF0); kbd_slow.send_frame(c);
    end
  endtask

  initial begin
    rst = 1;
    repeat (5) @(posedge clk);
    #1 rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      use_fast = (pass == 1);
      foreach (make_codes[i]) type_key(make_codes[i]);
      // Let the display show everything typed in this pass.
      wait (empty);
      repeat (20_000_000 / RATE_HZ + 10) @(posedge clk);
    end
    checks++;
    if (seen != typed) begin
      failures++;
      $display("FAIL displayed %0d codes, typed %0d", seen.size(), typed.size());
      for (int i = 0; i < seen.size() && i < typed.size(); i++)
        if (seen[i] != typed[i]) begin
          $display("  first difference at %0d: %h vs %h", i, seen[i], typed[i]);
          break;
        end
    end
    checks++;
    if (n_ferr != 0) begin
      failures++;
      $display("FAIL %0d frame errors", n_ferr);
    end
    $display("typed %0d codes, displayed %0d", typed.size(), seen.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
