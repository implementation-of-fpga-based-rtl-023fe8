// tb_sinref: drives random reference samples and modulation indices and
// checks sine_adj = 128 + floor((ref - 128) * (index - 128) / 128), worked
// out here in real arithmetic; checks the reset value and that the output
// only changes on the sample enable.
module tb_sinref;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  logic [7:0] sine_ref = 8'd128, index = 8'd128, sine_adj;
  int checks = 0, failures = 0;

  sinref dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(input int r, input int i);
    return 128 + int'($floor(real'((r - 128) * (i - 128)) / 128.0));
  endfunction

  initial begin
    int exp_v;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    checks++;
    if (sine_adj != 8'd128) begin failures++; $display("FAIL reset value %0d", sine_adj); end
    exp_v = 128;
    repeat (3000) begin
      sine_ref = 8'($urandom_range(1, 255));
      index = ($urandom_range(0, 9) == 0) ? 8'd255 : 8'($urandom_range(128, 255));
      ce = 1'($urandom);
      @(negedge clk);
      if (ce) exp_v = expected(int'(sine_ref), int'(index));
      checks++;
      if (int'(sine_adj) != exp_v) begin
        failures++;
        if (failures < 10)
          $display("FAIL ref=%0d idx=%0d ce=%0d adj=%0d expected %0d", sine_ref, index, ce, sine_adj, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
