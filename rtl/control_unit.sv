// control_unit: address generator of the sine and carrier lookup tables.
//
// On each sample enable (ce) the carrier address steps through one
// triangle period, 0..CARRIER_DEPTH-1, and wraps. The sine address scans
// the quarter-wave table up and then down, twice per sine period:
// quarter 1 up (0..D-1), quarter 2 down (D-1..0), quarter 3 up, quarter 4
// down, where D = SINE_DEPTH. At each turn the end address is read twice,
// which mirrors the quarter exactly because the table is sampled at the
// middle of each step (angle (k+0.5)*90/D degrees). One sine period is
// therefore 4*D samples. flag is 0 during quarters 1 and 2 and 1 during 3
// and 4 (negative half cycle).
//
// Timing: the addresses are registers updated on ce. The lookup tables
// read synchronously on the same ce, so their data for an address appears
// one sample later; flag is delayed by one sample here so that it lines up
// with the sine data it selects. Reset (synchronous, active high) puts the
// scan at the start of quarter 1 with flag 0.
//
// The up/down scan with the negative-cycle flag follows the controller's
// description; the table depths and the repeated end address are this
// design's choices.
module control_unit
  import spwm_pkg::*;
#(
  parameter int unsigned SINE_DEPTH_P    = SINE_DEPTH,
  parameter int unsigned CARRIER_DEPTH_P = CARRIER_DEPTH,
  localparam int unsigned SA_W = $clog2(SINE_DEPTH_P),
  localparam int unsigned CA_W = $clog2(CARRIER_DEPTH_P)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ce,
  output logic [CA_W-1:0] carrier_addr,
  output logic [SA_W-1:0] sine_addr,
  output logic            flag
);
  quarter_e quarter;
  logic     at_top, at_bottom;

  assign at_top    = sine_addr == SA_W'(SINE_DEPTH_P - 1);
  assign at_bottom = sine_addr == '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      carrier_addr <= '0;
      sine_addr    <= '0;
      quarter      <= Q1_UP;
      flag         <= 1'b0;
    end else if (ce) begin
      carrier_addr <= (carrier_addr == CA_W'(CARRIER_DEPTH_P - 1)) ? '0 : carrier_addr + 1'b1;
      flag         <= quarter[1];
      unique case (quarter)
        Q1_UP, Q3_UP: begin
          if (at_top) quarter <= (quarter == Q1_UP) ? Q2_DOWN : Q4_DOWN;
          else        sine_addr <= sine_addr + 1'b1;
        end
        Q2_DOWN, Q4_DOWN: begin
          if (at_bottom) quarter <= (quarter == Q2_DOWN) ? Q3_UP : Q1_UP;
          else           sine_addr <= sine_addr - 1'b1;
        end
      endcase
    end
  end
endmodule
