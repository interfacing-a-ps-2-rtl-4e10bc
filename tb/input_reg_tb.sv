// input_reg_tb -- checks the input register's delay and reset value.
//
// After reset both outputs must be 1 (idle line level). Then random levels
// are applied to both pins every cycle and each output must equal its pin
// exactly STAGES cycles earlier; the test is run for the default two
// stages.
module input_reg_tb;
  localparam int STAGES = 2;
  logic clk = 0, rst, ci, di, co, dq;
  logic [1:0] hist [$];
  int checks = 0, failures = 0;

  input_reg #(.STAGES(STAGES)) dut (.clk(clk), .rst(rst), .ps2_clk_in(ci), .ps2_data_in(di),
                                    .ps2_clk_s(co), .ps2_data_s(dq));

  always #5 clk = ~clk;

  initial begin
    rst = 1; ci = 0; di = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if ({co, dq} !== 2'b11) begin
      failures++;
      $display("FAIL reset value %b%b", co, dq);
    end
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      ci = 1'($urandom); di = 1'($urandom);
      hist.push_back({ci, di});
      @(posedge clk); #1;
      if (hist.size() == STAGES) begin
        logic [1:0] e;
        e = hist.pop_front();
        checks++;
        if ({co, dq} !== e) begin
          failures++;
          $display("FAIL cycle %0d: got %b%b expected %b", n, co, dq, e);
        end
      end
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
