// tb_mi_conversion: checks the float32 to fixed-point conversion of the
// modulation index against Y = 128 + floor(M*128), saturated to 128..255,
// for hand-picked and random values of M.
module tb_mi_conversion;
  logic [31:0] mi;
  logic [7:0]  index;
  int checks = 0, failures = 0;

  mi_conversion dut (.mi, .index);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // IEEE-754 single-precision encoding of a real, mantissa truncated
  // (written out here because the simulator keeps shortreal as real)
  function automatic logic [31:0] to_f32(input real r);
    int e;
    real f;
    longint frac;
    logic neg;
    if (r == 0.0) return 32'h0000_0000;
    f = (r < 0.0) ? -r : r;
    e = 0;
    while (f >= 2.0) begin f = f / 2.0; e++; end
    while (f < 1.0) begin f = f * 2.0; e--; end
    frac = longint'($floor((f - 1.0) * 8388608.0));
    neg = r < 0.0;
    return {neg, 8'(e + 127), frac[22:0]};
  endfunction

  // value of an encoded normal number
  function automatic real from_f32(input logic [31:0] b);
    real v;
    int e;
    v = 1.0 + real'(b[22:0]) / 8388608.0;
    e = int'(b[30:23]) - 127;
    while (e > 0) begin v = v * 2.0; e--; end
    while (e < 0) begin v = v / 2.0; e++; end
    return b[31] ? -v : v;
  endfunction

  function automatic int expected(input real r);
    if (r >= 1.0) return 255;
    if (r <= 0.0) return 128;
    return 128 + int'($floor(r * 128.0));
  endfunction

  task automatic try(input real m);
    real exact;
    mi = to_f32(m);
    exact = (mi[30:0] == 0) ? 0.0 : from_f32(mi);
    #1;
    checks++;
    if (int'(index) != expected(exact)) begin
      failures++;
      $display("FAIL M=%f index=%0d expected %0d", exact, index, expected(exact));
    end
  endtask

  initial begin
    real fixed[$] = '{0.0, 0.5, 0.25, 0.75, 0.8, 0.999, 1.0, 1.3, -0.5, 0.0078125, 0.001, 0.9921875};
    foreach (fixed[i]) try(fixed[i]);
    repeat (2000) try(real'($urandom_range(0, 1000000)) / 1000000.0);
    // special encodings: +inf, NaN, denormal
    mi = 32'h7F80_0000; #1; checks++; if (index != 8'd255) begin failures++; $display("FAIL inf"); end
    mi = 32'h7FC0_0000; #1; checks++; if (index != 8'd255) begin failures++; $display("FAIL nan"); end
    mi = 32'h0000_0001; #1; checks++; if (index != 8'd128) begin failures++; $display("FAIL denormal"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
