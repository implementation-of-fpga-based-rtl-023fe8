// spwm_comp: sine-carrier comparator of one inverter leg.
//
// pwm is 1 when the adjustable-amplitude sine is equal to or greater than
// the carrier, 0 otherwise (unsigned 8-bit compare). Combinational. The
// rule is the controller's; where its description also says "higher
// than", the "equal to or greater" form is the one used.
module spwm_comp
  import spwm_pkg::*;
#(
  parameter int unsigned W = N
) (
  input  logic [W-1:0] sine_adj,
  input  logic [W-1:0] carrier,
  output logic         pwm
);
  assign pwm = sine_adj >= carrier;
endmodule
