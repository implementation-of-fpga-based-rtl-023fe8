// tb_control_unit: checks the table address sequence. After j sample
// enables the carrier address must be j mod 64 and the sine address the
// j-th step of the up-down-up-down scan of the 768-word quarter table;
// flag must show the half cycle of the previous sample. Enables are given
// at random, some on consecutive clocks, over three sine periods.
module tb_control_unit;
  localparam int D = 768, C = 64;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  logic [5:0] carrier_addr;
  logic [9:0] sine_addr;
  logic flag;
  int checks = 0, failures = 0;
  int j = 0;
  int turns = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_addr(input int s);
    int q, pos;
    q   = (s / D) % 4;
    pos = s % D;
    return (q % 2 == 0) ? pos : D - 1 - pos;
  endfunction

  function automatic bit exp_flag(input int jj);
    if (jj == 0) return 1'b0;
    return ((((jj - 1) / D) % 4) >= 2);
  endfunction

  task automatic check_now();
    checks++;
    if (int'(carrier_addr) != j % C || int'(sine_addr) != exp_addr(j) || flag != exp_flag(j)) begin
      failures++;
      if (failures < 10)
        $display("FAIL j=%0d ca=%0d sa=%0d flag=%0d exp %0d %0d %0d", j, carrier_addr,
                 sine_addr, flag, j % C, exp_addr(j), exp_flag(j));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check_now();
    while (j < 3 * 4 * D + 5) begin
      ce = ($urandom_range(0, 2) != 0);
      @(negedge clk);
      if (ce) begin
        j++;
        if (j % D == 0) turns++;
      end
      check_now();
    end
    checks++;
    if (turns < 12) begin
      failures++;
      $display("FAIL only %0d quarter turns", turns);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
