// shift_reg_tb -- checks the frame shift register.
//
// First shifts in nine bits of a known frame (eight data bits LSB first,
// then parity) with idle cycles between shifts, and checks that q[7:0]
// is the byte and q[8] the parity bit, and that q holds while shift_en is
// low. Then drives random din/shift_en for many cycles and compares every
// cycle with a reference that remembers the last nine shifted bits.
module shift_reg_tb;
  logic       clk = 0, rst, shift_en, din;
  logic [8:0] q;
  logic [8:0] ref_q;
  int checks = 0, failures = 0;

  shift_reg #(.WIDTH(9)) dut (.clk(clk), .rst(rst), .shift_en(shift_en), .din(din), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic [8:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected=%b", what, q, exp);
    end
  endtask

  initial begin
    logic [7:0] code;
    logic [8:0] bits;
    rst = 1; shift_en = 0; din = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check('0, "reset");
    code = 8'h1C;
    bits = {~^code, code};
    for (int i = 0; i < 9; i++) begin
      din = bits[i]; shift_en = 1;
      @(posedge clk); #1;
      shift_en = 0; din = ~din;
      repeat (3) @(posedge clk);
      #1;
    end
    check({~^code, code}, "frame 1C");
    ref_q = q;
    for (int n = 0; n < 2000; n++) begin
      shift_en = 1'($urandom);
      din      = 1'($urandom);
      @(posedge clk); #1;
      if (shift_en) ref_q = {din, ref_q[8:1]};
      check(ref_q, "random");
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
