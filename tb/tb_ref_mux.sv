// tb_ref_mux: checks both multiplexer modes with random data: the first
// passes the table data when flag = 0 and the negative value when flag = 1,
// the second the other way round.
module tb_ref_mux;
  logic flag;
  logic [7:0] sine_data, yx, ref1, ref2;
  int checks = 0, failures = 0;

  ref_mux #(.INVERT(1'b0)) dut1 (.flag, .sine_data, .yx, .sine_ref(ref1));
  ref_mux #(.INVERT(1'b1)) dut2 (.flag, .sine_data, .yx, .sine_ref(ref2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) begin
      flag = 1'($urandom);
      sine_data = 8'($urandom_range(128, 255));
      yx = 8'(256 - int'(sine_data));
      #1;
      checks++;
      if (ref1 != (flag ? yx : sine_data) || ref2 != (flag ? sine_data : yx)) begin
        failures++;
        $display("FAIL flag=%0d data=%0d yx=%0d ref1=%0d ref2=%0d", flag, sine_data, yx, ref1, ref2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
