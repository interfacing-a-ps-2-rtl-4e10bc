// one_shot_tb -- checks the falling-edge one-shot.
//
// Drives ps2_clk with random high and low runs of 1-6 cycles, changing it
// just after a clock edge. For every cycle the expected pulse is 1 only in
// the first cycle after ps2_clk went from 1 to 0; the test also counts
// falling edges and pulses and checks that the counts agree and that no
// pulse ever lasts two cycles.
module one_shot_tb;
  logic clk = 0, rst, ps2_clk, pulse;
  logic last;
  int checks = 0, failures = 0, falls = 0, pulses = 0;

  one_shot dut (.clk(clk), .rst(rst), .ps2_clk(ps2_clk), .pulse(pulse));

  always #5 clk = ~clk;

  initial begin
    logic expect_pulse, prev_pulse;
    rst = 1; ps2_clk = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (pulse !== 1'b1) begin  // reset loads idle level 1, ps2_clk is 0
      failures++;
      $display("FAIL no pulse while held low under reset");
    end
    ps2_clk = 1; rst = 0;
    last = 1; prev_pulse = 0;
    for (int run = 0; run < 400; run++) begin
      int len;
      logic lvl;
      len = 1 + ($urandom % 6);
      lvl = ~ps2_clk;
      for (int c = 0; c < len; c++) begin
        if (c == 0) ps2_clk = lvl;
        #1;
        expect_pulse = last && !ps2_clk;
        if (expect_pulse) falls++;
        checks++;
        if (pulse !== expect_pulse) begin
          failures++;
          $display("FAIL at run %0d: pulse=%b expected=%b", run, pulse, expect_pulse);
        end
        if (pulse) pulses++;
        if (pulse && prev_pulse) failures++;
        prev_pulse = pulse;
        @(posedge clk);
        last = ps2_clk;
        #1;
      end
    end
    checks++;
    if (falls != pulses || falls < 100) begin
      failures++;
      $display("FAIL falls=%0d pulses=%0d", falls, pulses);
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
