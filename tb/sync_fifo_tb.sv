// sync_fifo_tb -- checks the synchronous FIFO against a queue model.
//
// Runs at the default 8 x 256 size. Phases: fill until FULL with writes
// only (FULL must rise after exactly DEPTH writes, and further writes are
// dropped), drain with reads only (data in order, EMPTY after DEPTH reads,
// a read while empty leaves DOUT unchanged), then many cycles of random
// reads and writes, with SINIT once in the middle. DOUT is checked in the
// cycle after each accepted read; FULL and EMPTY every cycle.
module sync_fifo_tb;
  localparam int W = 8, D = 256;
  logic clk = 0, sinit, wr_en, rd_en, full, empty;
  logic [W-1:0] din, dout;
  logic [W-1:0] model [$];
  logic [W-1:0] exp_dout;
  logic         pend;
  int checks = 0, failures = 0, dropped = 0, empty_reads = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk(clk), .sinit(sinit), .din(din), .wr_en(wr_en),
                                         .rd_en(rd_en), .dout(dout), .full(full), .empty(empty));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (size %0d)", what, model.size());
    end
  endtask

  // One clock cycle with the given controls; updates the model.
  task automatic step(input logic w, input logic r, input logic [W-1:0] d);
    bit do_w, do_r;
    wr_en = w; rd_en = r; din = d;
    #1;
    chk(full == (model.size() == D), "full flag");
    chk(empty == (model.size() == 0), "empty flag");
    do_r = r && model.size() != 0;
    do_w = w && model.size() != D;
    if (w && !do_w) dropped++;
    if (r && !do_r) empty_reads++;
    @(posedge clk);
    if (do_r) begin
      exp_dout = model.pop_front();
      pend = 1;
    end
    if (do_w) model.push_back(d);
    #1;
    if (pend || (r && !do_r)) chk(dout == exp_dout, "dout");
    pend = 0;
    wr_en = 0; rd_en = 0;
  endtask

  initial begin
    sinit = 1; wr_en = 0; rd_en = 0; din = 0; pend = 0; exp_dout = 0;
    repeat (2) @(posedge clk);
    #1 sinit = 0;
    for (int i = 0; i < D + 5; i++) step(1, 0, W'($urandom));
    chk(full && dropped == 5, "full after DEPTH writes");
    for (int i = 0; i < D + 3; i++) step(0, 1, 'x);
    chk(empty && empty_reads == 3, "empty after DEPTH reads");
    for (int n = 0; n < 20000; n++) begin
      if (n == 10000) begin
        sinit = 1; @(posedge clk); #1 sinit = 0;
        model.delete(); exp_dout = 0;
        chk(empty && dout == 0, "sinit");
      end
      // bias the fill level so full and empty both recur
      if ((n / 1000) % 2 == 0) step(($urandom % 4) != 0, ($urandom % 4) == 0, W'($urandom));
      else                     step(($urandom % 4) == 0, ($urandom % 4) != 0, W'($urandom));
    end
    $display("dropped writes %0d, empty reads %0d", dropped, empty_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
