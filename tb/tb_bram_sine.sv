// tb_bram_sine: reads every word of the quarter-wave sine table and
// compares it with 128 + round(127*sin(pi/2*(k+0.5)/768)) computed here;
// also checks that the output holds while the enable is low and that the
// read takes one clock.
module tb_bram_sine;
  localparam int D = 768;
  logic clk = 1'b0, en = 1'b0;
  logic [9:0] addr = '0;
  logic [7:0] data;
  int checks = 0, failures = 0;

  bram_sine dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(input int k);
    return 128 + int'($floor(127.0 * $sin(3.14159265358979 / 2.0 * (real'(k) + 0.5) / real'(D)) + 0.5));
  endfunction

  initial begin
    logic [7:0] held;
    for (int k = 0; k < D; k++) begin
      @(negedge clk);
      addr = 10'(k);
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      checks++;
      if (int'(data) != expected(k)) begin
        failures++;
        $display("FAIL k=%0d data=%0d expected %0d", k, data, expected(k));
      end
      // with en low the word must not change
      held = data;
      addr = 10'((k + 7) % D);
      @(negedge clk);
      checks++;
      if (data != held) begin
        failures++;
        $display("FAIL data changed with en low at k=%0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
