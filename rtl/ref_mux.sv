// ref_mux: selects the reference sine sample for one inverter leg.
//
// With INVERT = 0 (the first multiplexer) it passes the table data while
// flag = 0 (positive half cycle) and the negative value from the
// processing unit while flag = 1. With INVERT = 1 (the second multiplexer)
// it does the opposite, so the two references are the same sine 180
// degrees apart. Combinational. Both modes are the controller's; folding
// them into one parameterised module is this design's choice.
module ref_mux
  import spwm_pkg::*;
#(
  parameter bit          INVERT = 1'b0,
  parameter int unsigned W      = N
) (
  input  logic         flag,
  input  logic [W-1:0] sine_data,
  input  logic [W-1:0] yx,
  output logic [W-1:0] sine_ref
);
  assign sine_ref = (flag ^ INVERT) ? yx : sine_data;
endmodule
