// dead_time: gate pair of one inverter leg with programmable dead time.
//
// Makes the upper gate t_p (follows pwm) and the lower gate t_n (follows
// the inverted pwm) so that the two switches of a leg never conduct
// together. When pwm changes, the gate that was on turns off on the next
// clock, and the other one turns on only after the new pwm value has been
// stable for dt_cycles further clocks: both gates are off for
// dt_cycles + 1 clock cycles around every transition. A pulse shorter than
// that is swallowed.
//
// Timing: registered outputs, one clock behind pwm when no transition is
// pending. Reset (synchronous, active high) turns both gates off and
// re-arms the dead time. The need for a programmable delay between the two
// gate signals and the inverted lower gates are the controller's; the
// counter circuit and counting in board-clock cycles are this design's
// choices.
module dead_time #(
  parameter int unsigned DT_W = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            pwm,
  input  logic [DT_W-1:0] dt_cycles,
  output logic            t_p,
  output logic            t_n
);
  logic            pwm_q;
  logic [DT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      pwm_q <= 1'b0;
      cnt   <= dt_cycles;
      t_p   <= 1'b0;
      t_n   <= 1'b0;
    end else begin
      pwm_q <= pwm;
      if (pwm != pwm_q) begin
        cnt <= dt_cycles;
        t_p <= 1'b0;
        t_n <= 1'b0;
      end else if (cnt != '0) begin
        cnt <= cnt - 1'b1;
        t_p <= 1'b0;
        t_n <= 1'b0;
      end else begin
        t_p <= pwm;
        t_n <= !pwm;
      end
    end
  end

  // The two gates of a leg are never on together.
  a_no_shoot_through: assert property (@(posedge clk) disable iff (rst) !(t_p && t_n));
endmodule
