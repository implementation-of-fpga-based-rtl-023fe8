// tb_clk_divider: checks the clock divider of the SPWM controller.
// For sel = 0, 1 and 2 it measures the spacing of clkdiv13 pulses (13
// clocks), the spacing of tick pulses (13 * 2^(sel+1) clocks, one per
// rising edge of bclkx8) and that bclk is high for 4 of every 8 ticks.
module tb_clk_divider;
  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] sel = 3'd0;
  logic clkdiv13, bclkx8, bclk, tick;
  int checks = 0, failures = 0;
  longint cyc = 0;

  clk_divider dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    longint last, now;
    int hi;
    for (int s = 0; s < 3; s++) begin
      rst = 1'b1;
      sel = 3'(s);
      repeat (3) @(negedge clk);
      rst = 1'b0;
      // clkdiv13 spacing
      @(negedge clk iff clkdiv13);
      last = cyc;
      repeat (5) begin
        @(negedge clk iff clkdiv13);
        now = cyc;
        check(now - last == 13, $sformatf("clkdiv13 period %0d", now - last));
        last = now;
      end
      // tick spacing
      @(negedge clk iff tick);
      last = cyc;
      repeat (4) begin
        @(negedge clk iff tick);
        now = cyc;
        check(now - last == longint'(13 * (2 ** (s + 1))),
              $sformatf("sel=%0d tick period %0d", s, now - last));
        last = now;
      end
      // bclk: high for half of 8 tick periods
      repeat (2) begin
        hi = 0;
        for (int t = 0; t < 8; t++) begin
          do begin
            if (bclk) hi++;
            @(negedge clk);
          end while (!tick);
        end
        check(hi == 4 * 13 * (2 ** (s + 1)), $sformatf("sel=%0d bclk high %0d", s, hi));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
