// bram_carrier: triangular carrier lookup table in block RAM.
//
// Holds one period of the triangle, word i = (255*t + DEPTH/4) / (DEPTH/2)
// with t = i for i <= DEPTH/2 and t = DEPTH - i otherwise (integer
// division): 0 at i = 0, 255 at i = DEPTH/2, then back down. Contents are
// loaded from rtl/carrier.hex, written for DEPTH = 64.
//
// Read is synchronous: on a clock edge with en high, data takes the word at
// addr. Both tables are read on the same sample enable, so sine and
// carrier share one sampling rate as the controller prescribes; the depth
// and full 0..255 swing are this design's choices.
module bram_carrier
  import spwm_pkg::*;
#(
  parameter int unsigned DEPTH = CARRIER_DEPTH,
  parameter int unsigned W     = N,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  data
);
  logic [W-1:0] mem [DEPTH];

  initial $readmemh("rtl/carrier.hex", mem);

  always_ff @(posedge clk) begin
    if (en) data <= mem[addr];
  end
endmodule
