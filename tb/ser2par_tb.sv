// ser2par_tb -- receives keyboard frames through the serial-to-parallel
// receiver.
//
// A behavioural keyboard sends every make code of the scan code sample
// (A-Z), the break prefix F0, random bytes, and frames with a wrong parity
// bit or a missing stop bit, with stray idle clock edges in between. Each
// good frame must give one fifo_write with the byte on scan_code; each bad
// one a frame_error and no write. The write must come within a few cycles
// of the stop bit's falling clock edge.
module ser2par_tb;
  localparam int HALF = 12;
  logic clk = 0, rst, kclk, kdata;
  logic [7:0] scan_code;
  logic fifo_write, frame_error;
  logic [7:0] expq [$];
  int checks = 0, failures = 0, n_err = 0, exp_err = 0;
  int stop_fall, lat;

  logic [7:0] make_codes [26] = '{8'h1C, 8'h32, 8'h21, 8'h23, 8'h24, 8'h2B, 8'h34, 8'h33,
                                  8'h43, 8'h3B, 8'h42, 8'h4B, 8'h3A, 8'h31, 8'h44, 8'h4D,
                                  8'h15, 8'h2D, 8'h1B, 8'h2C, 8'h3C, 8'h2A, 8'h1D, 8'h22,
                                  8'h35, 8'h1A};

  ps2_device_model #(.HALF(HALF)) kbd (.clk(clk), .clk_line(kclk), .data_line(kdata),
                                      .ps2_clk(kclk), .ps2_data(kdata));

  ser2par dut (.clk(clk), .rst(rst), .ps2_clk(kclk), .ps2_data(kdata),
               .scan_code(scan_code), .fifo_write(fifo_write), .frame_error(frame_error));

  always #5 clk = ~clk;

  int cyc = 0;
  logic kclk_q = 1;
  int falls = 0;
  always @(posedge clk) begin
    cyc++;
    kclk_q <= kclk;
    if (kclk_q && !kclk) begin
      falls++;
      stop_fall = cyc;
    end
    if (!rst && fifo_write) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected write %h", scan_code);
      end else begin
        logic [7:0] e;
        e = expq.pop_front();
        if (scan_code !== e) begin
          failures++;
          $display("FAIL code %h expected %h", scan_code, e);
        end
      end
      lat = cyc - stop_fall;
      checks++;
      if (lat > 3) begin
        failures++;
        $display("FAIL latency %0d cycles", lat);
      end
    end
    if (!rst && frame_error) n_err++;
  end

  task automatic good(input logic [7:0] c);
    expq.push_back(c);
    kbd.send_frame(c, 1'b0, 1'b0);
  endtask

  initial begin
    rst = 1;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    kbd.idle(10);
    foreach (make_codes[i]) begin
      good(make_codes[i]);
      good(8'hF0);
      good(make_codes[i]);
    end
    kbd.stray_edge();
    kbd.send_frame(8'h1C, 1'b1, 1'b0); exp_err++;
    good(8'h32);
    kbd.send_frame(8'h21, 1'b0, 1'b1); exp_err++;
    kbd.idle(3 * HALF);  // bad stop leaves data low: let the line idle
    good(8'h23);
    for (int k = 0; k < 100; k++) begin
      int kind;
      logic [7:0] c;
      kind = $urandom % 6;
      c = 8'($urandom);
      if (kind == 0)      begin kbd.send_frame(c, 1'b1, 1'b0); exp_err++; end
      else if (kind == 1) begin kbd.send_frame(c, 1'b0, 1'b1); exp_err++; kbd.idle(3 * HALF); end
      else if (kind == 2) begin kbd.stray_edge(); good(c); end
      else                good(c);
    end
    kbd.idle(20);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d codes never written", expq.size());
    end
    checks++;
    if (n_err != exp_err) begin
      failures++;
      $display("FAIL frame errors %0d expected %0d", n_err, exp_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
