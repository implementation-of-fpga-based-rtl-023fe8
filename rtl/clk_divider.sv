// clk_divider: clock manager of the SPWM controller.
//
// Turns the 10 MHz board clock into the sample rate of the SPWM datapath,
// with a 3-bit select that sets the switching frequency from outside.
// Chain: ctr1 counts 0..12 and pulses clkdiv13 once every 13 clocks; ctr2
// (8 bits) counts those pulses; bclkx8 is bit sel of ctr2, so it is the
// clkdiv13 rate divided by 2^(sel+1); ctr3 (3 bits) counts rising edges of
// bclkx8 and bclk is its top bit, one eighth of bclkx8. tick is a one-cycle
// pulse on each rising edge of bclk and is the sample enable of the rest of
// the design, which all runs on clk (one clock domain).
//
// Rates at clk = 10 MHz: tick = 10e6 / (13 * 2^(sel+1) * 8), i.e. 48.1 kHz
// for sel = 0 and 24.0 kHz for sel = 1. With 16 samples per carrier period
// this gives a 3.0 kHz / 1.5 kHz switching frequency.
//
// The signal names and counter widths follow the divider's simulation
// trace; how the counters chain and the use of an enable instead of a
// derived clock are this design's own choices. Reset (active high,
// synchronous) clears all counters.
module clk_divider #(
  parameter int unsigned DIV13  = 13,
  parameter int unsigned CTR2_W = 8,
  parameter int unsigned SEL_W  = 3,
  parameter int unsigned CTR3_W = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [SEL_W-1:0] sel,
  output logic             clkdiv13,
  output logic             bclkx8,
  output logic             bclk,
  output logic             tick
);
  logic [3:0]        ctr1;
  logic [CTR2_W-1:0] ctr2;
  logic [CTR3_W-1:0] ctr3;
  logic              bclkx8_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      ctr1     <= '0;
      clkdiv13 <= 1'b0;
    end else if (ctr1 == 4'(DIV13 - 1)) begin
      ctr1     <= '0;
      clkdiv13 <= 1'b1;
    end else begin
      ctr1     <= ctr1 + 4'd1;
      clkdiv13 <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)           ctr2 <= '0;
    else if (clkdiv13) ctr2 <= ctr2 + 1'b1;
  end

  assign bclkx8 = ctr2[sel];

  always_ff @(posedge clk) begin
    if (rst) begin
      bclkx8_q <= 1'b0;
      ctr3     <= '0;
    end else begin
      bclkx8_q <= bclkx8;
      if (bclkx8 && !bclkx8_q) ctr3 <= ctr3 + 1'b1;
    end
  end

  assign bclk = ctr3[CTR3_W-1];
  assign tick = bclkx8 && !bclkx8_q;
endmodule
