// parity_checker_tb -- exhaustive test of the odd-parity checker.
//
// Applies all 512 combinations of data byte and parity bit and compares
// parity_ok with a reference that counts the ones: 1 exactly when the nine
// bits hold an odd number of ones.
module parity_checker_tb;
  logic [7:0] data;
  logic       parity;
  logic       parity_ok;
  int checks = 0, failures = 0;

  parity_checker dut (.data(data), .parity(parity), .parity_ok(parity_ok));

  initial begin
    for (int v = 0; v < 512; v++) begin
      int ones;
      {parity, data} = 9'(v);
      #1;
      ones = 0;
      for (int b = 0; b < 9; b++) ones += (v >> b) & 1;
      checks++;
      if (parity_ok !== ((ones % 2) == 1)) begin
        failures++;
        $display("FAIL data=%h parity=%b ok=%b", data, parity, parity_ok);
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
