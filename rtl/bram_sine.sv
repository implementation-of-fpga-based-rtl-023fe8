// bram_sine: quarter-wave sine lookup table in block RAM.
//
// Word k holds 128 + round(127 * sin(pi/2 * (k + 0.5) / DEPTH)), the first
// quarter of one sine period in 8-bit offset binary (128 = zero, values
// 128..255). The other three quarters are produced outside by scanning the
// table down again and by the negative-value unit. Contents are loaded
// from rtl/sine_quarter.hex, written for DEPTH = 768; a different depth
// needs that file regenerated with the formula above.
//
// Read is synchronous, like an FPGA block RAM: on a clock edge with en
// high, data takes the word at addr. No reset on the data register.
//
// Storing one quarter of the wave is the controller's scheme; the depth,
// amplitude 127 and half-step phase offset are this design's choices.
module bram_sine
  import spwm_pkg::*;
#(
  parameter int unsigned DEPTH = SINE_DEPTH,
  parameter int unsigned W     = N,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  data
);
  logic [W-1:0] mem [DEPTH];

  initial $readmemh("rtl/sine_quarter.hex", mem);

  always_ff @(posedge clk) begin
    if (en) data <= mem[addr];
  end
endmodule
