// seg_rom_tb -- checks the hex digit ROM against a list of lit segments.
//
// The expected glyph of every digit 0-F is written as the letters of the
// segments that should light ("abcdef" for 0 ...), turned into a bit mask
// here, independently of the ROM's own table. All 16 digits are checked.
module seg_rom_tb;
  logic [3:0] nibble;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                        "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                        "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  seg_rom dut (.nibble(nibble), .seg(seg));

  function automatic logic [6:0] mask(input string s);
    logic [6:0] m = '0;
    for (int i = 0; i < s.len(); i++) m[s[i] - "a"] = 1'b1;
    return m;
  endfunction

  initial begin
    for (int d = 0; d < 16; d++) begin
      nibble = 4'(d);
      #1;
      checks++;
      if (seg !== mask(glyph[d])) begin
        failures++;
        $display("FAIL digit %h: seg=%b expected=%b", d, seg, mask(glyph[d]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
