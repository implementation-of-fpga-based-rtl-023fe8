// tb_bram_carrier: reads the triangle table and compares each word with
// (255*t + 16)/32, t = i for i <= 32 and 64 - i otherwise; checks the one
// clock read and that data holds while the enable is low.
module tb_bram_carrier;
  localparam int C = 64;
  logic clk = 1'b0, en = 1'b0;
  logic [5:0] addr = '0;
  logic [7:0] data;
  int checks = 0, failures = 0;

  bram_carrier dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(input int i);
    int t;
    t = (i <= C / 2) ? i : C - i;
    return (255 * t + C / 4) / (C / 2);
  endfunction

  initial begin
    logic [7:0] held;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < C; i++) begin
        @(negedge clk);
        addr = 6'(i);
        en = 1'b1;
        @(negedge clk);
        en = 1'b0;
        checks++;
        if (int'(data) != expected(i)) begin
          failures++;
          $display("FAIL i=%0d data=%0d expected %0d", i, data, expected(i));
        end
        held = data;
        addr = 6'(i + 5);
        @(negedge clk);
        checks++;
        if (data != held) begin
          failures++;
          $display("FAIL data changed with en low");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
