// receiver_fsm_tb -- checks the receiver FSM directly.
//
// Plays whole frames as one-cycle clock pulses with a few idle cycles in
// between, setting ps2_data and parity_ok for each pulse as a frame would.
// Checked: pulses with data high in Idle do nothing; a start bit followed by
// nine pulses gives exactly nine shift_en strobes, each in the cycle of its
// pulse; the stop pulse gives fifo_write only when stop = 1 and
// parity_ok = 1, otherwise frame_error; no output appears without a pulse;
// after every frame the FSM is back in Idle (the next start bit works).
module receiver_fsm_tb;
  logic clk = 0, rst, pulse, data, pok;
  logic shift_en, fifo_write, frame_error;
  int checks = 0, failures = 0;
  int n_shift, n_write, n_err, n_stray;

  receiver_fsm dut (.clk(clk), .rst(rst), .ps2_clk_pulse(pulse), .ps2_data(data),
                    .parity_ok(pok), .shift_en(shift_en), .fifo_write(fifo_write),
                    .frame_error(frame_error));

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (shift_en)    n_shift++;
    if (fifo_write)  n_write++;
    if (frame_error) n_err++;
    if ((shift_en || fifo_write || frame_error) && !pulse) n_stray++;
  end

  task automatic give_pulse(input logic d, input logic p);
    data = d; pok = p;
    repeat (1 + $urandom % 4) @(posedge clk);
    #1 pulse = 1;
    @(posedge clk);
    #1 pulse = 0; data = 1'($urandom);
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic frame(input logic stop, input logic p, input string what);
    int s0 = n_shift, w0 = n_write, e0 = n_err;
    give_pulse(1'b0, 1'b0);                    // start bit
    expect_eq(n_shift - s0, 0, {what, " start shifts"});
    for (int i = 0; i < 9; i++) give_pulse(1'($urandom), 1'($urandom));
    expect_eq(n_shift - s0, 9, {what, " shifts"});
    expect_eq(n_write - w0, 0, {what, " early write"});
    give_pulse(stop, p);
    expect_eq(n_write - w0, (stop && p) ? 1 : 0, {what, " write"});
    expect_eq(n_err - e0, (stop && p) ? 0 : 1, {what, " error"});
    expect_eq(n_shift - s0, 9, {what, " shifts after stop"});
  endtask

  initial begin
    rst = 1; pulse = 0; data = 1; pok = 0;
    n_shift = 0; n_write = 0; n_err = 0; n_stray = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // Pulses with data high in Idle are not start bits.
    for (int i = 0; i < 5; i++) give_pulse(1'b1, 1'b1);
    expect_eq(n_shift + n_write + n_err, 0, "idle pulses");
    frame(1'b1, 1'b1, "good");
    frame(1'b0, 1'b1, "bad stop");
    frame(1'b1, 1'b0, "bad parity");
    frame(1'b0, 1'b0, "bad both");
    for (int k = 0; k < 50; k++) begin
      logic s, p;
      s = ($urandom % 4) != 0;
      p = ($urandom % 4) != 0;
      frame(s, p, "random");
    end
    // Reset in the middle of a frame returns to Idle.
    give_pulse(1'b0, 1'b0);
    give_pulse(1'b1, 1'b1);
    #1 rst = 1; @(posedge clk); #1 rst = 0;
    give_pulse(1'b1, 1'b1);
    frame(1'b1, 1'b1, "after reset");
    expect_eq(n_stray, 0, "outputs without pulse");
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
