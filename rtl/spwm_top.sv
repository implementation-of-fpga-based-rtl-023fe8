// spwm_top: unipolar SPWM controller for a single-phase H-bridge inverter.
//
// Datapath, all on the board clock clk with the sample enable tick:
//   clk_divider   -> tick, the sample rate, set by sel
//   mi_conversion -> 8-bit index from the float32 modulation index mi
//   control_unit  -> carrier address, quarter-wave sine address, flag
//   bram_carrier, bram_sine (synchronous read on tick)
//   processing_unit -> negative-cycle value 256 - X
//   ref_mux x2    -> reference sine for each leg, 180 degrees apart
//   sinref x2     -> references scaled by the modulation index
//   carrier_delay -> carrier aligned with the scaled references
//   spwm_comp x2  -> leg A compares reference 2, leg B reference 1
//   dead_time x2  -> Ta+/Ta- and Tb+/Tb- with a programmable gap
// Leg A switches the bridge's S1 (Ta+) and S2 (Ta-), leg B S3 (Tb+) and
// S4 (Tb-). Because the two references are opposite sines compared with
// one carrier, the bridge output is three-level (unipolar) SPWM.
//
// Latency: a table address issued on one tick reaches sine_ref1/2 and
// carrier two ticks later; the comparator is combinational and the dead
// time unit adds one clock plus the dead time at each edge. One sine
// period is 4*SINE_DEPTH_P ticks, one carrier period CARRIER_DEPTH_P
// ticks (48 carrier periods per sine period at the defaults). sine_ref1,
// sine_ref2, carrier and tick are brought out for observation.
//
// The block structure follows the controller's architecture; the table
// sizes, single clock domain and dead-time circuit are this design's
// choices (see each block's header).
module spwm_top
  import spwm_pkg::*;
#(
  parameter int unsigned SINE_DEPTH_P    = SINE_DEPTH,
  parameter int unsigned CARRIER_DEPTH_P = CARRIER_DEPTH
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [2:0]  sel,
  input  logic [31:0] mi,
  input  logic [7:0]  dead_time,
  output logic        ta_p,
  output logic        ta_n,
  output logic        tb_p,
  output logic        tb_n,
  output sample_t     sine_ref1,
  output sample_t     sine_ref2,
  output sample_t     carrier,
  output logic        tick
);
  localparam int unsigned SA_W = $clog2(SINE_DEPTH_P);
  localparam int unsigned CA_W = $clog2(CARRIER_DEPTH_P);

  logic clkdiv13, bclkx8, bclk;
  sample_t index;
  logic [CA_W-1:0] carrier_addr;
  logic [SA_W-1:0] sine_addr;
  logic flag;
  sample_t carrier_data, sine_data, yx, mux1, mux2;
  logic pwm_a, pwm_b;

  clk_divider u_dcm (
    .clk, .rst, .sel, .clkdiv13, .bclkx8, .bclk, .tick
  );

  mi_conversion u_conv (.mi, .index);

  control_unit #(
    .SINE_DEPTH_P(SINE_DEPTH_P), .CARRIER_DEPTH_P(CARRIER_DEPTH_P)
  ) u_ctrl (
    .clk, .rst, .ce(tick), .carrier_addr, .sine_addr, .flag
  );

  bram_carrier #(.DEPTH(CARRIER_DEPTH_P)) u_bram_carrier (
    .clk, .en(tick), .addr(carrier_addr), .data(carrier_data)
  );

  bram_sine #(.DEPTH(SINE_DEPTH_P)) u_bram_sine (
    .clk, .en(tick), .addr(sine_addr), .data(sine_data)
  );

  processing_unit u_proc (.x(sine_data), .yx);

  ref_mux #(.INVERT(1'b0)) u_mux1 (.flag, .sine_data, .yx, .sine_ref(mux1));
  ref_mux #(.INVERT(1'b1)) u_mux2 (.flag, .sine_data, .yx, .sine_ref(mux2));

  sinref u_sinref1 (.clk, .rst, .ce(tick), .sine_ref(mux1), .index, .sine_adj(sine_ref1));
  sinref u_sinref2 (.clk, .rst, .ce(tick), .sine_ref(mux2), .index, .sine_adj(sine_ref2));

  carrier_delay u_carrier (
    .clk, .rst, .ce(tick), .carrier_in(carrier_data), .carrier_out(carrier)
  );

  spwm_comp u_comp_a (.sine_adj(sine_ref2), .carrier, .pwm(pwm_a));
  spwm_comp u_comp_b (.sine_adj(sine_ref1), .carrier, .pwm(pwm_b));

  dead_time u_dt_a (.clk, .rst, .pwm(pwm_a), .dt_cycles(dead_time), .t_p(ta_p), .t_n(ta_n));
  dead_time u_dt_b (.clk, .rst, .pwm(pwm_b), .dt_cycles(dead_time), .t_p(tb_p), .t_n(tb_n));
endmodule
