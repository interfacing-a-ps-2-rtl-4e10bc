// seg_rom -- hex digit to seven-segment ROM.
//
// Combinational lookup of the pattern that shows one hex digit 0-F on a
// digit LED. The table is the function hex_to_7seg in smd098_pkg, so the
// ROM is a function call as the design asks. Output order {g,f,e,d,c,b,a}
// and active-high segments are this design's choice.
module seg_rom
  import smd098_pkg::*;
(
  input  logic [3:0] nibble,
  output logic [6:0] seg
);

  assign seg = hex_to_7seg(nibble);

endmodule
