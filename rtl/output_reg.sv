// output_reg -- display register and digit ROMs.
//
// Holds the scan code shown on the two digit LEDs. When en is high (the
// timer's read strobe, delayed one cycle so that the FIFO's output is
// valid) the register takes d; otherwise it keeps its value. Two seg_rom
// instances turn the high and low nibbles into seven-segment patterns for
// the left and right digits. Registering the byte and decoding after the
// register, and clearing to 00 on reset, are this design's choices.
//
// Interface: code is the held byte; seg_hi/seg_lo are {g,f,e,d,c,b,a},
// active high, combinational from code. Reset is synchronous, active high.
module output_reg
  import smd098_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [CODE_W-1:0] d,
  output logic [CODE_W-1:0] code,
  output logic [6:0]        seg_hi,
  output logic [6:0]        seg_lo
);

  always_ff @(posedge clk) begin
    if (rst)     code <= '0;
    else if (en) code <= d;
  end

  seg_rom u_rom_hi (.nibble(code[7:4]), .seg(seg_hi));
  seg_rom u_rom_lo (.nibble(code[3:0]), .seg(seg_lo));

endmodule
