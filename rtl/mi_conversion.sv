// mi_conversion: modulation index from IEEE-754 single precision to the
// 8-bit fixed-point index used by the amplitude scaling.
//
// Y = M * 2^(N-1) + 2^(N-1), so M = 0 gives 128 and M = 0.5 gives 192.
// M*128 is formed by shifting the mantissa 1.f by (exponent - 127 + 7)
// and truncating the fraction. Out-of-range inputs saturate: M = 1 (which
// would be 256), anything above 1, +inf and NaN give 255; negative numbers,
// zero and values below 1/128 give 128. Purely combinational.
//
// The formula is the controller's; truncation and saturation are this
// design's choices.
module mi_conversion
  import spwm_pkg::*;
#(
  parameter int unsigned W = N
) (
  input  logic [31:0]  mi,
  output logic [W-1:0] index
);
  logic        sign;
  logic [7:0]  expo;
  logic [23:0] mant;   // with hidden one
  int          sh;     // right shift that turns the mantissa into M*2^(W-1)
  logic [23:0] scaled;

  assign sign = mi[31];
  assign expo = mi[30:23];
  assign mant = {1'b1, mi[22:0]};

  always_comb begin
    // value = mant * 2^(expo-127-23); times 2^(W-1) -> shift by
    // 23 + 127 - (W-1) - expo to the right
    sh     = 23 + 127 - (int'(W) - 1) - int'(expo);
    scaled = '0;
    if (sign || expo == 8'd0) begin
      index = W'(1 << (W - 1));                   // M <= 0
    end else if (expo == 8'hFF || sh <= 23 - (int'(W) - 1)) begin
      index = '1;                                 // M >= 1, inf, NaN
    end else begin
      if (sh < 24) scaled = mant >> sh;
      index = W'(scaled) + W'(1 << (W - 1));
    end
  end
endmodule
