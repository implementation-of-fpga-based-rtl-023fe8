// tb_dead_time: drives a random pwm stream (runs of 1 to 40 clocks) at
// dead times 0, 3 and 10 and compares both gates with a run-length model:
// a gate is on only when pwm has held its value for more than dt_cycles
// clocks. Also counts the dead gaps and checks that both gates are never
// on together.
module tb_dead_time;
  logic clk = 1'b0, rst = 1'b1, pwm = 1'b0;
  logic [7:0] dt_cycles = '0;
  logic t_p, t_n;
  int checks = 0, failures = 0, gaps = 0, swallowed = 0;

  dead_time dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dts[3] = '{0, 3, 10};
    int stable;
    bit prev;
    foreach (dts[d]) begin
      rst = 1'b1;
      dt_cycles = 8'(dts[d]);
      @(negedge clk);
      rst = 1'b0;
      stable = 0;   // reset acts like a fresh transition to 0
      prev = 1'b0;
      repeat (150) begin
        int run;
        pwm = 1'($urandom);
        run = $urandom_range(1, 40);
        if (run <= dts[d] && pwm != prev) swallowed++;
        repeat (run) begin
          @(posedge clk);
          if (pwm == prev) stable++;
          else stable = 0;
          prev = pwm;
          @(negedge clk);
          checks++;
          if (t_p != (pwm && stable > dts[d]) || t_n != (!pwm && stable > dts[d])) begin
            failures++;
            if (failures < 10)
              $display("FAIL dt=%0d pwm=%0d stable=%0d t_p=%0d t_n=%0d", dts[d], pwm, stable, t_p, t_n);
          end
          if (!t_p && !t_n) gaps++;
          checks++;
          if (t_p && t_n) begin failures++; $display("FAIL shoot-through"); end
        end
      end
    end
    checks++;
    if (gaps == 0 || swallowed == 0) begin
      failures++;
      $display("FAIL gaps=%0d swallowed=%0d", gaps, swallowed);
    end
    $display("dead clocks %0d, swallowed pulses %0d", gaps, swallowed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
