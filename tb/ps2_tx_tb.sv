// ps2_tx_tb -- sends bytes from the host transmitter to a keyboard model.
//
// The wires are modelled as open-collector: each line is low when either
// the transmitter's drive enable or the keyboard pulls it. For every byte
// the testbench checks that the keyboard model received it with correct
// parity and stop bit, that the host held Clock low for at least
// INHIBIT_CYC cycles first, that busy covers the transfer, that done
// pulses exactly once and that ack_ok reports the keyboard's acknowledge
// bit. Some transfers are not acknowledged and must report ack_ok = 0.
module ps2_tx_tb;
  localparam int HALF = 10, INHIBIT = 40;
  logic clk = 0, rst, start;
  logic [7:0] din;
  logic kclk, kdata, clk_drive, data_drive, busy, done, ack_ok;
  wire  clk_line  = kclk & ~clk_drive;
  wire  data_line = kdata & ~data_drive;
  int checks = 0, failures = 0, n_done = 0, low_run = 0, max_low = 0;

  ps2_device_model #(.HALF(HALF)) kbd (.clk(clk), .clk_line(clk_line), .data_line(data_line),
                                       .ps2_clk(kclk), .ps2_data(kdata));

  ps2_tx #(.INHIBIT_CYC(INHIBIT)) dut (.clk(clk), .rst(rst), .start(start), .din(din),
    .ps2_clk(clk_line), .ps2_data(data_line), .clk_drive(clk_drive), .data_drive(data_drive),
    .busy(busy), .done(done), .ack_ok(ack_ok));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (done) n_done++;
    if (clk_drive) low_run++;
    else begin
      if (low_run > max_low) max_low = low_run;
      low_run = 0;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic one(input logic [7:0] b, input bit no_ack);
    logic [7:0] got;
    bit ok;
    int d0;
    d0 = n_done;
    max_low = 0;
    @(posedge clk); #1;
    din = b; start = 1;
    @(posedge clk); #1;
    start = 0; din = 'x;
    chk(busy, "busy after start");
    kbd.receive_frame(got, ok, no_ack);
    repeat (5) @(posedge clk);
    #1;
    chk(ok && got == b, $sformatf("keyboard got %h ok=%b, sent %h", got, ok, b));
    chk(n_done - d0 == 1, "one done pulse");
    chk(ack_ok == !no_ack, $sformatf("ack_ok=%b no_ack=%b", ack_ok, no_ack));
    chk(!busy && !clk_drive && !data_drive, "lines released after transfer");
    chk(max_low >= INHIBIT, $sformatf("clock inhibit %0d cycles", max_low));
  endtask

  initial begin
    rst = 1; start = 0; din = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (10) @(posedge clk);
    chk(!busy && !clk_drive && !data_drive, "idle after reset");
    one(8'hED, 0);
    one(8'h04, 0);
    one(8'h00, 0);
    one(8'hFF, 1);
    for (int i = 0; i < 40; i++) one(8'($urandom), ($urandom % 5) == 0);
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
