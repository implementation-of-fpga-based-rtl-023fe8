// tb_carrier_delay: feeds a random carrier stream with random enables and
// checks that the default one-stage instance and a three-stage instance
// return the sample from one and three enables earlier.
module tb_carrier_delay;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  logic [7:0] carrier_in = '0, out1, out3;
  int checks = 0, failures = 0;
  logic [7:0] hist[$];

  carrier_delay dut1 (.clk, .rst, .ce, .carrier_in, .carrier_out(out1));
  carrier_delay #(.STAGES(3)) dut3 (.clk, .rst, .ce, .carrier_in, .carrier_out(out3));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    hist = '{8'd0, 8'd0, 8'd0};   // reset contents
    repeat (2000) begin
      carrier_in = 8'($urandom);
      ce = 1'($urandom);
      @(negedge clk);
      if (ce) hist.push_back(carrier_in);
      checks++;
      if (out1 != hist[$] || out3 != hist[$-2]) begin
        failures++;
        if (failures < 10) $display("FAIL out1=%0d out3=%0d expected %0d %0d", out1, out3, hist[$], hist[$-2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
