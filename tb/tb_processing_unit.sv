// tb_processing_unit: applies every positive sample X = 128..255 and
// checks Yx = 256 - X, the mirror of X about mid-scale.
module tb_processing_unit;
  logic [7:0] x, yx;
  int checks = 0, failures = 0;

  processing_unit dut (.x, .yx);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 128; v < 256; v++) begin
      x = 8'(v);
      #1;
      checks++;
      if (int'(yx) != 256 - v) begin
        failures++;
        $display("FAIL x=%0d yx=%0d", v, yx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
