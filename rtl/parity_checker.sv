// parity_checker -- odd-parity check of a received PS/2 byte.
//
// Combinational. A PS/2 frame uses odd parity: the eight data bits plus the
// parity bit always hold an odd number of ones. parity_ok is 1 when that is
// so (no parity error) and 0 otherwise, exactly the checker the design asks
// for. The XOR reduction over all nine bits is 1 for an odd count.
module parity_checker (
  input  logic [7:0] data,
  input  logic       parity,
  output logic       parity_ok
);

  assign parity_ok = ^{parity, data};

endmodule
