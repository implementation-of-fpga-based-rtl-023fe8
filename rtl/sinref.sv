// sinref: adjustable-amplitude sine.
//
// Scales an offset-binary reference sample around mid-scale by the
// modulation index: sine_adj = 128 + floor((sine_ref - 128) * (index - 128)
// / 128). Since index = M*128 + 128, (index - 128)/128 is M, so the output
// is M times the reference sine. With index 255 (M saturated) the gain is
// 127/128; the output stays within 1..254.
//
// Timing: sine_adj is a register loaded on the sample enable ce, one
// sample after the table data it uses. Reset (synchronous, active high)
// sets it to 128 (zero). The block's role comes from the controller; the
// multiply-and-shift arithmetic is this design's choice.
module sinref
  import spwm_pkg::*;
#(
  parameter int unsigned W = N
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  input  logic [W-1:0] sine_ref,
  input  logic [W-1:0] index,
  output logic [W-1:0] sine_adj
);
  localparam int signed HALF = 1 << (W - 1);
  logic signed [W:0]     d, m;
  logic signed [2*W+1:0] prod;
  logic signed [2*W+1:0] scaled;

  always_comb begin
    d      = $signed({1'b0, sine_ref}) - (W + 1)'(HALF);
    m      = $signed({1'b0, index}) - (W + 1)'(HALF);
    prod   = d * m;
    scaled = (prod >>> (W - 1)) + (2 * W + 2)'(HALF);
  end

  always_ff @(posedge clk) begin
    if (rst)     sine_adj <= W'(HALF);
    else if (ce) sine_adj <= W'(scaled);
  end
endmodule
