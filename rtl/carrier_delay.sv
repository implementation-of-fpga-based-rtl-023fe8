// carrier_delay: carrier register and alignment delay.
//
// Passes the carrier sample through STAGES registers loaded on the sample
// enable ce, so that it reaches the comparators in the same cycle as the
// two adjustable-amplitude sines, which spend one sample in their own
// register. Reset (synchronous, active high) clears the stages to 0.
// The carrier register with a delay element is part of the controller's
// block diagram; reading the delay as pipeline alignment, and its length,
// are this design's interpretation.
module carrier_delay
  import spwm_pkg::*;
#(
  parameter int unsigned W      = N,
  parameter int unsigned STAGES = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  input  logic [W-1:0] carrier_in,
  output logic [W-1:0] carrier_out
);
  logic [W-1:0] stage [STAGES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(STAGES); i++) stage[i] <= '0;
    end else if (ce) begin
      stage[0] <= carrier_in;
      for (int i = 1; i < int'(STAGES); i++) stage[i] <= stage[i-1];
    end
  end

  assign carrier_out = stage[STAGES-1];
endmodule
