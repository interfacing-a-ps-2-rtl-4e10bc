// output_reg_tb -- checks the display register and its two digit ROMs.
//
// After reset the register shows 00. Random bytes are offered every cycle
// with a random enable; the held byte must change only on an enabled edge,
// and seg_hi/seg_lo must show the high and low nibble. Expected segment
// patterns come from a table in this testbench written as lit-segment
// letters, independent of the design's ROM table.
module output_reg_tb;
  logic clk = 0, rst, en;
  logic [7:0] d, code, held;
  logic [6:0] seg_hi, seg_lo;
  int checks = 0, failures = 0;

  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                        "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                        "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  output_reg dut (.clk(clk), .rst(rst), .en(en), .d(d), .code(code),
                  .seg_hi(seg_hi), .seg_lo(seg_lo));

  always #5 clk = ~clk;

  function automatic logic [6:0] mask(input string s);
    logic [6:0] m = '0;
    for (int i = 0; i < s.len(); i++) m[s[i] - "a"] = 1'b1;
    return m;
  endfunction

  task automatic check_display(input logic [7:0] e);
    checks++;
    if (code !== e || seg_hi !== mask(glyph[e[7:4]]) || seg_lo !== mask(glyph[e[3:0]])) begin
      failures++;
      $display("FAIL code=%h seg=%b/%b expected %h", code, seg_hi, seg_lo, e);
    end
  endtask

  initial begin
    rst = 1; en = 1; d = 8'hFF;
    repeat (2) @(posedge clk);
    #1 check_display(8'h00);
    rst = 0;
    held = 0;
    for (int n = 0; n < 2000; n++) begin
      en = ($urandom % 3) == 0;
      d = 8'($urandom);
      @(posedge clk);
      if (en) held = d;
      #1 check_display(held);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
