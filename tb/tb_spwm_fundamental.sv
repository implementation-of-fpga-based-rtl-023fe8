// tb_spwm_fundamental: checks that the modulation index sets the amplitude
// of the inverter output.
//
// The bridge voltage, in units of the DC-link voltage, is
// v = (Ta+ - Ta-)/2 - (Tb+ - Tb-)/2 per clock (a leg with both gates off
// in its dead gap counts as 0). For M = 0.25, 0.5, 0.8 and 1.0 the test
// runs the controller at sel = 0 with a 5-clock dead time, waits for the
// pipeline to fill, then integrates v over exactly one fundamental period
// (3072 ticks) against a sine and a cosine of that period. The magnitude of
// the fundamental must be within 0.02 of M * (127/128) * (254/255), the
// gain of the 8-bit sine table and scaling, and the DC part must be
// below 0.02. It also checks the magnitude rises with M. Full default
// sizes; about 0.35 million clock cycles.
module tb_spwm_fundamental;
  import spwm_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] sel = 3'd0;
  logic [31:0] mi;
  logic [7:0] dead_time = 8'd5;
  logic ta_p, ta_n, tb_p, tb_n, tick;
  sample_t sine_ref1, sine_ref2, carrier;
  int checks = 0, failures = 0;

  spwm_top dut (.*);

  always #50 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] to_f32(input real r);
    int e;
    real f;
    longint frac;
    if (r <= 0.0) return 32'h0000_0000;
    f = r;
    e = 0;
    while (f >= 2.0) begin f = f / 2.0; e++; end
    while (f < 1.0) begin f = f * 2.0; e--; end
    frac = longint'($floor((f - 1.0) * 8388608.0));
    return {1'b0, 8'(e + 127), frac[22:0]};
  endfunction

  initial begin
    real ms[4] = '{0.25, 0.5, 0.8, 1.0};
    real last_mag = 0.0;
    foreach (ms[i]) begin
      real a, b, dc, mag, expect_mag, ph, v;
      longint n, total;
      rst = 1'b1;
      mi = to_f32(ms[i]);
      repeat (3) @(negedge clk);
      rst = 1'b0;
      // let the two-sample pipeline fill
      repeat (3) @(negedge clk iff tick);
      // one period = 3072 ticks of 26 clocks
      total = 3072 * 26;
      a = 0.0; b = 0.0; dc = 0.0;
      for (n = 0; n < total; n++) begin
        @(negedge clk);
        v = 0.5 * (real'(int'(ta_p)) - real'(int'(ta_n))) - 0.5 * (real'(int'(tb_p)) - real'(int'(tb_n)));
        ph = 2.0 * 3.14159265358979 * real'(n) / real'(total);
        a += v * $sin(ph);
        b += v * $cos(ph);
        dc += v;
      end
      a = 2.0 * a / real'(total);
      b = 2.0 * b / real'(total);
      dc = dc / real'(total);
      mag = $sqrt(a * a + b * b);
      expect_mag = ((ms[i] >= 1.0) ? 127.0 / 128.0 : ms[i]) * (254.0 / 255.0);
      $display("M=%4.2f fundamental %6.4f (expected %6.4f) dc %7.4f", ms[i], mag, expect_mag, dc);
      checks++;
      if (mag < expect_mag - 0.02 || mag > expect_mag + 0.02) begin
        failures++;
        $display("FAIL fundamental amplitude");
      end
      checks++;
      if (dc > 0.02 || dc < -0.02) begin
        failures++;
        $display("FAIL dc component");
      end
      checks++;
      if (mag <= last_mag) begin
        failures++;
        $display("FAIL amplitude does not rise with M");
      end
      last_mag = mag;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
