// tb_spwm_top: end-to-end test of the SPWM controller at its default
// sizes (768-word quarter sine table, 64-word carrier).
//
// A reference model written here follows the sample counter j (ticks since
// reset): after tick j the two scaled references and the carrier shown by
// the controller belong to sample j-2. The model forms the sine from
// 128 + round(127*sin(...)) with the quarter-wave mirror, the negative half
// as 256 - X, the scaling by the modulation index and the triangle carrier,
// and predicts both gate pairs from the >= comparison. Checked on every
// tick: both references, the carrier, all four gates (settled, i.e. after
// the dead time), the tick spacing for the selected divider, that no leg
// ever has both gates on, and that every dead gap after the first gate
// turn-on lasts dead_time+1 clocks.
//
// Schedule: phase A runs one full sine period plus a few samples at
// sel = 0, M = 0.8, dead time 10 clocks; phase B switches to sel = 1 and
// M = 0.5; phase C sets M = 1.0 (saturated index) and dead time 0.
// Mechanisms counted (each must occur): positive and negative half cycles,
// quarter-table turns (up to down and down to up), carrier peaks per sine
// period (must be 48), output levels +1, 0 and -1 of the unipolar bridge,
// dead gaps, a switching-frequency change and a modulation-index change.
module tb_spwm_top;
  import spwm_pkg::*;
  localparam int D = 768, C = 64;

  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] sel = 3'd0;
  logic [31:0] mi;
  logic [7:0] dead_time = 8'd10;
  logic ta_p, ta_n, tb_p, tb_n, tick;
  sample_t sine_ref1, sine_ref2, carrier;
  int checks = 0, failures = 0;

  spwm_top dut (.*);

  always #50 clk = ~clk;   // 10 MHz

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // IEEE-754 single-precision encoding (mantissa truncated)
  function automatic logic [31:0] to_f32(input real r);
    int e;
    real f;
    longint frac;
    if (r <= 0.0) return 32'h0000_0000;
    f = r;
    e = 0;
    while (f >= 2.0) begin f = f / 2.0; e++; end
    while (f < 1.0) begin f = f * 2.0; e--; end
    frac = longint'($floor((f - 1.0) * 8388608.0));
    return {1'b0, 8'(e + 127), frac[22:0]};
  endfunction

  function automatic int index_of(input real m);
    if (m >= 1.0) return 255;
    return 128 + int'($floor(m * 128.0));
  endfunction

  function automatic int quarter_word(input int k);
    return 128 + int'($floor(127.0 * $sin(3.14159265358979 / 2.0 * (real'(k) + 0.5) / real'(D)) + 0.5));
  endfunction

  // reference sine 1 (leg B) or 2 (leg A) for sample s, before scaling
  function automatic int ref_of(input int s, input bit second);
    int q, pos, x;
    q   = (s / D) % 4;
    pos = s % D;
    x   = quarter_word((q % 2 == 0) ? pos : D - 1 - pos);
    return ((q >= 2) ^ second) ? 256 - x : x;
  endfunction

  function automatic int scale(input int r, input int idx);
    return 128 + int'($floor(real'((r - 128) * (idx - 128)) / 128.0));
  endfunction

  function automatic int carrier_of(input int s);
    int i, t;
    i = s % C;
    t = (i <= C / 2) ? i : C - i;
    return (255 * t + C / 4) / (C / 2);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // model state
  int j = 0;
  real m_now = 0.8;
  int exp1 = 128, exp2 = 128, expc = 0;
  bit  have_exp = 0;
  longint cyc = 0, last_tick = -1;
  int period_exp;
  // mechanism counters
  int n_pos = 0, n_neg = 0, n_turn_top = 0, n_turn_bot = 0, n_peaks = 0;
  int n_lvl_p = 0, n_lvl_0 = 0, n_lvl_n = 0, n_gaps = 0, n_sel_change = 0, n_mi_change = 0;
  int peaks_in_period = 0;
  int gap_a = 0, gap_b = 0;
  bit started_a = 0, started_b = 0;   // the first gap after reset is not a transition

  always @(posedge clk) cyc <= cyc + 1;

  // dead-gap length: every run of both-off clocks of a leg lasts dead_time+1
  always @(negedge clk) begin
    if (!rst) begin
      if (!ta_p && !ta_n) gap_a++;
      else begin
        if (gap_a != 0 && started_a) begin
          check(gap_a == int'(dead_time) + 1, $sformatf("leg A gap %0d clocks", gap_a));
          n_gaps++;
        end
        started_a = 1;
        gap_a = 0;
      end
      if (!tb_p && !tb_n) gap_b++;
      else begin
        if (gap_b != 0 && started_b) begin
          check(gap_b == int'(dead_time) + 1, $sformatf("leg B gap %0d clocks", gap_b));
          n_gaps++;
        end
        started_b = 1;
        gap_b = 0;
      end
      check(!(ta_p && ta_n) && !(tb_p && tb_n), "shoot-through");
    end
  end

  initial begin
    bit pending = 0;
    mi = to_f32(m_now);
    period_exp = 13 * 2;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    forever begin
      @(negedge clk);
      if (pending) begin
        // the tick edge has just updated the controller
        int s, pa, pb;
        pending = 0;
        j++;
        if (last_tick >= 0)
          check(cyc - last_tick == longint'(period_exp),
                $sformatf("tick spacing %0d, expected %0d", cyc - last_tick, period_exp));
        last_tick = cyc;
        if (j >= 2) begin
          s = j - 2;
          exp1 = scale(ref_of(s, 1'b0), index_of(m_now));
          exp2 = scale(ref_of(s, 1'b1), index_of(m_now));
          expc = carrier_of(s);
          have_exp = 1;
          check(int'(sine_ref1) == exp1 && int'(sine_ref2) == exp2 && int'(carrier) == expc,
                $sformatf("sample %0d: ref1 %0d/%0d ref2 %0d/%0d carrier %0d/%0d", s,
                          sine_ref1, exp1, sine_ref2, exp2, carrier, expc));
          if ((s / D) % 4 < 2) n_pos++; else n_neg++;
          if (s % D == 0 && s > 0) begin
            if ((s / D) % 2 == 1) n_turn_top++; else n_turn_bot++;
          end
          if (expc == 255) peaks_in_period++;
          if (s % (4 * D) == 4 * D - 1) begin
            check(peaks_in_period == 48, $sformatf("%0d carrier peaks per sine period", peaks_in_period));
            n_peaks++;
            peaks_in_period = 0;
          end
        end
        // schedule
        if (j == 4 * D + 40) begin
          sel = 3'd1;
          period_exp = 13 * 4;
          last_tick = -1;
          m_now = 0.5;
          mi = to_f32(m_now);
          n_sel_change++;
          n_mi_change++;
        end
        if (j == 4 * D + 800) begin
          m_now = 1.0;
          mi = to_f32(m_now);
          dead_time = 8'd0;
          n_mi_change++;
        end
        if (j == 4 * D + 1600) break;
      end
      if (tick) begin
        // the gates settled on the current sample; check them before it changes
        if (have_exp && j >= 3) begin
          bit pa, pb;
          int lvl;
          pa = exp2 >= expc;
          pb = exp1 >= expc;
          check(ta_p == pa && ta_n == !pa && tb_p == pb && tb_n == !pb,
                $sformatf("gates at j=%0d: %b%b%b%b expected %b%b%b%b", j, ta_p, ta_n, tb_p, tb_n,
                          pa, !pa, pb, !pb));
          lvl = int'(ta_p) - int'(tb_p);
          if (lvl > 0) n_lvl_p++;
          else if (lvl < 0) n_lvl_n++;
          else n_lvl_0++;
        end
        pending = 1;
      end
    end
    $display("half cycles: positive samples %0d, negative samples %0d", n_pos, n_neg);
    $display("table turns: top %0d, bottom %0d; sine periods checked for 48 carrier peaks: %0d",
             n_turn_top, n_turn_bot, n_peaks);
    $display("bridge levels: +1 %0d, 0 %0d, -1 %0d; dead gaps %0d", n_lvl_p, n_lvl_0, n_lvl_n, n_gaps);
    $display("switching-frequency changes %0d, modulation-index changes %0d", n_sel_change, n_mi_change);
    check(n_pos > 0, "no positive half cycle");
    check(n_neg > 0, "no negative half cycle");
    check(n_turn_top > 0, "no top turn of the quarter table");
    check(n_turn_bot > 0, "no bottom turn of the quarter table");
    check(n_peaks > 0, "no complete sine period");
    check(n_lvl_p > 0 && n_lvl_0 > 0 && n_lvl_n > 0, "not all three bridge levels seen");
    check(n_gaps > 0, "no dead gap");
    check(n_sel_change > 0 && n_mi_change > 0, "no mode change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
