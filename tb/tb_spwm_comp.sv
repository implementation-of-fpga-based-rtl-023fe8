// tb_spwm_comp: applies every pair of 8-bit sine and carrier values and
// checks pwm = (sine >= carrier), the equal case included.
module tb_spwm_comp;
  logic [7:0] sine_adj, carrier;
  logic pwm;
  int checks = 0, failures = 0;

  spwm_comp dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 256; s++) begin
      for (int c = 0; c < 256; c++) begin
        sine_adj = 8'(s);
        carrier = 8'(c);
        #1;
        checks++;
        if (pwm != (s >= c)) begin
          failures++;
          if (failures < 10) $display("FAIL s=%0d c=%0d pwm=%0d", s, c, pwm);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
