// processing_unit: negative-cycle value of a stored sine sample.
//
// For a positive offset-binary sample X (128..255) it returns
// Yx = X - 2*(X - 2^(N-1)) = 2^N - X, the same distance below mid-scale
// (1..128). Combinational; the formula is the controller's own.
module processing_unit
  import spwm_pkg::*;
#(
  parameter int unsigned W = N
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] yx
);
  localparam logic [W:0] HALF = (W + 1)'(1) << (W - 1);
  logic [W:0] diff;

  always_comb begin
    diff = {1'b0, x} - HALF;              // X - 2^(N-1)
    yx   = W'({1'b0, x} - (diff << 1));   // X - 2*(X - 2^(N-1))
  end
endmodule
