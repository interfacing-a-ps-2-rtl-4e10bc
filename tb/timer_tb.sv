// timer_tb -- checks the display timer's period, empty skip and out_en.
//
// Uses CLK_HZ = 1000 and RATE_HZ = 10, a period of 100 cycles. fifo_empty
// is driven randomly. fifo_rd must be high exactly on cycles 100, 200, ...
// after reset (counted from the first cycle out of reset being 1) when
// fifo_empty is low, never otherwise; out_en must equal fifo_rd of the
// previous cycle. The number of ticks seen is checked against the run
// length.
module timer_tb;
  localparam int CLK_HZ = 1000, RATE_HZ = 10, PERIOD = CLK_HZ / RATE_HZ;
  logic clk = 0, rst, empty, rd, oen;
  logic last_rd;
  int checks = 0, failures = 0, reads = 0, skipped = 0;

  timer #(.CLK_HZ(CLK_HZ), .RATE_HZ(RATE_HZ)) dut (.clk(clk), .rst(rst), .fifo_empty(empty),
                                                   .fifo_rd(rd), .out_en(oen));

  always #5 clk = ~clk;

  initial begin
    rst = 1; empty = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    last_rd = 0;
    for (int c = 1; c <= 50 * PERIOD; c++) begin
      bit tick;
      empty = ($urandom % 3) == 0;
      #1;
      tick = (c % PERIOD) == 0;
      checks++;
      if (rd !== (tick && !empty)) begin
        failures++;
        $display("FAIL cycle %0d: rd=%b tick=%b empty=%b", c, rd, tick, empty);
      end
      checks++;
      if (oen !== last_rd) begin
        failures++;
        $display("FAIL cycle %0d: out_en=%b expected %b", c, oen, last_rd);
      end
      if (rd) reads++;
      if (tick && empty) skipped++;
      last_rd = rd;
      @(posedge clk);
      #1;
    end
    checks++;
    if (reads + skipped != 50 || skipped == 0) begin
      failures++;
      $display("FAIL ticks: reads=%0d skipped=%0d", reads, skipped);
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
