// spwm_pkg: word width and table sizes shared by the SPWM controller.
//
// The datapath works on 8-bit unsigned offset-binary samples: the value
// 2^(N-1) = 128 stands for zero, 255 for the positive peak and 1 for
// the negative peak. The 8-bit word width follows the controller's
// fixed-point format; the two table depths are this design's choice and
// set the ratio of carrier to fundamental frequency:
// fc/fm = 4*SINE_DEPTH/CARRIER_DEPTH = 48. The carrier depth also sets the
// duty-cycle resolution: 64 samples per triangle give 33 distinct carrier
// levels, enough for the output fundamental to follow the modulation index
// to within about 1%.
package spwm_pkg;
  localparam int unsigned N             = 8;
  localparam int unsigned SINE_DEPTH    = 768;  // words in the quarter-wave sine table
  localparam int unsigned CARRIER_DEPTH = 64;   // words in one triangle period

  typedef logic [N-1:0] sample_t;

  // Position in the sine period: which quarter is being scanned.
  typedef enum logic [1:0] {
    Q1_UP   = 2'd0,  // 0..90 deg, addresses rising, positive half
    Q2_DOWN = 2'd1,  // 90..180 deg, addresses falling, positive half
    Q3_UP   = 2'd2,  // 180..270 deg, addresses rising, negative half
    Q4_DOWN = 2'd3   // 270..360 deg, addresses falling, negative half
  } quarter_e;
endpackage
