// tb_spwm_top: end-to-end test of the three-level SPWM generator at its
// default sizes (1000-count carrier, 16-bit accumulator, 256 x 9-bit table,
// 20-clock dead band), driving three NPC leg models.
//
// It runs the generator through four operating points, each for at least one
// full output cycle: magnitude 400 / step 327 (the 50 Hz case), 400 / 300,
// 700 / 100, and 1023 / 1500 (over-modulation, the reference clamps at the
// carrier peaks). Checked against models written here:
//   - carrier: strobe every 2000 clocks (10 kHz at 50 ns), car_hi = car_lo + 1000;
//   - references: three clocks after each strobe, every phase equals
//     clamp(1000 + floor(round(255 sin(2 pi k/256)) * mi / 256)) with k taken
//     from a testbench accumulator and the 85 / 170 phase offsets;
//   - level: the three-level rule applied to the previous clock's reference
//     and carriers;
//   - gates: no shoot-through or forbidden pattern ever, and once a level has
//     been held for DEAD+2 clocks the leg model outputs exactly that level;
//   - one sine cycle lasts ceil or floor of 65536/frq carrier periods;
//   - in every carrier period each leg spends exactly the number of clocks at
//     +Vdc/2 and -Vdc/2 that its reference calls for.
// Mechanisms counted, each must occur: all three levels on every phase, dead
// bands, accumulator wraps, reference clamping, magnitude and frequency
// changes.
module tb_spwm_top;
  import spwm_pkg::*;

  localparam int CAR = 1000;
  localparam int DEAD = 20;

  logic clk = 1'b0, rst = 1'b1;
  logic [9:0]  mi = 10'd400;
  logic [15:0] frq = 16'd327;
  logic [11:0] pulse;
  logic [10:0] car_lo, car_hi, ref_a, ref_b, ref_c;
  level_e      level [3];
  logic        samp, cycle_wrap;

  spwm_top dut (.clk, .rst, .mi, .frq, .pulse, .car_lo, .car_hi,
                .ref_a, .ref_b, .ref_c, .level, .samp, .cycle_wrap);

  logic signed [1:0] van [3];
  logic defined [3], fault [3];
  for (genvar p = 0; p < 3; p++) begin : g_leg
    npc_leg_model u_leg (.s1(pulse[4*p]), .s2(pulse[4*p+1]), .s1n(pulse[4*p+2]),
                         .s2n(pulse[4*p+3]), .van(van[p]), .defined(defined[p]),
                         .fault(fault[p]));
  end

  always #25 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1_000_000_000;   // 20 M clocks
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sine_ref(int k);
    real v;
    v = 255.0 * $sin(2.0 * 3.141592653589793 * k / 256.0);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int scaled(int s, int m);
    int p, q, r;
    p = s * m;
    q = (p >= 0) ? p / 256 : -((-p + 255) / 256);
    r = CAR + q;
    return (r < 0) ? 0 : (r > 2 * CAR) ? 2 * CAR : r;
  endfunction

  // ---------------------------------------------------------------- monitors
  int n_level [3][3];
  int n_dead = 0, n_wrap = 0, n_clamp = 0, n_mi_change = 0, n_frq_change = 0;
  int model_acc = 0;
  int since_samp = -1, last_samp_t = -1, t = 0;
  int held [3];
  int periods_since_wrap = 0, last_cycle_len = 0;
  logic [10:0] prev_ref [3], prev_lo, prev_hi;
  level_e prev_level [3];
  bit   prev_defined [3];
  bit   started = 0;
  int   exp_k [3];
  int   wraps_since_change = 0, n_cycles_checked = 0;

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      t++;
      // carrier
      check(car_hi == car_lo + 11'(CAR), "carrier offset");
      if (samp) begin
        if (last_samp_t >= 0) check(t - last_samp_t == 2 * CAR, "carrier period 2000 clocks");
        last_samp_t = t;
        since_samp = 0;
        // the accumulator adds the step present during the strobe clock
        model_acc = (model_acc + int'(frq)) % 65536;
      end else if (since_samp >= 0) since_samp++;
      // references, three clocks after the strobe
      if (since_samp == 3) begin
        exp_k[0] = (model_acc >> 8) % 256;
        exp_k[1] = ((model_acc >> 8) + 85) % 256;
        exp_k[2] = ((model_acc >> 8) + 170) % 256;
        check(int'(ref_a) == scaled(sine_ref(exp_k[0]), int'(mi)), $sformatf("ref_a %0d exp %0d", ref_a, scaled(sine_ref(exp_k[0]), int'(mi))));
        check(int'(ref_b) == scaled(sine_ref(exp_k[1]), int'(mi)), "ref_b");
        check(int'(ref_c) == scaled(sine_ref(exp_k[2]), int'(mi)), "ref_c");
        if (int'(ref_a) inside {0, 2 * CAR} || int'(ref_b) inside {0, 2 * CAR} || int'(ref_c) inside {0, 2 * CAR}) n_clamp++;
        periods_since_wrap++;
      end
      if (cycle_wrap) begin
        n_wrap++;
        last_cycle_len = periods_since_wrap;
        wraps_since_change++;
        if (wraps_since_change == 2) begin
          n_cycles_checked++;
          check(periods_since_wrap == 65536 / int'(frq) || periods_since_wrap == 65536 / int'(frq) + 1,
                $sformatf("cycle of %0d periods at step %0d", periods_since_wrap, frq));
        end
        periods_since_wrap = 0;
      end
      // comparator and gates
      for (int p = 0; p < 3; p++) begin
        if (started) begin
          level_e e;
          e = (prev_ref[p] > prev_hi) ? LVL_POS : (prev_ref[p] > prev_lo) ? LVL_ZERO : LVL_NEG;
          check(level[p] == e, $sformatf("level of phase %0d", p));
          held[p] = (level[p] == prev_level[p]) ? held[p] + 1 : 0;
        end
        n_level[p][int'(level[p])]++;
        check(!fault[p], $sformatf("forbidden gate pattern on phase %0d: %b", p, pulse[4*p +: 4]));
        if (held[p] >= DEAD + 2) begin
          int ev;
          ev = (level[p] == LVL_POS) ? 1 : (level[p] == LVL_ZERO) ? 0 : -1;
          check(defined[p] && int'(van[p]) == ev, $sformatf("leg %0d output %0d for level %0d", p, van[p], ev));
        end
        if (prev_defined[p] && !defined[p]) n_dead++;
        prev_defined[p] = defined[p];
        prev_ref[p]   = (p == 0) ? ref_a : (p == 1) ? ref_b : ref_c;
        prev_level[p] = level[p];
      end
      prev_lo = car_lo;
      prev_hi = car_hi;
      started = 1;
    end
  end

  // ------------------------------------------------- per-period volt-seconds
  // Over any 2000 consecutive clocks the lower carrier takes 0 and 1000 once
  // and every value in between twice. With a reference r held for the whole
  // period, the leg therefore spends exactly
  //   2(r-1000)-1 clocks at +Vdc/2 (r > 1000), and
  //   2(1000-r)+1 clocks at -Vdc/2 (0 < r <= 1000; 2000 when r = 0),
  // so the period average follows the reference, the essence of SPWM.
  int win_ref [3], win_pos [3], win_neg [3];
  bit win_open = 0;
  int ss = -1, n_duty_checked = 0;

  function automatic int exp_pos(int r);
    return (r > CAR) ? 2 * (r - CAR) - 1 : 0;
  endfunction
  function automatic int exp_neg(int r);
    return (r == 0) ? 2 * CAR : (r <= CAR) ? 2 * (CAR - r) + 1 : 0;
  endfunction

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      if (samp) ss = 0; else if (ss >= 0) ss++;
      if (win_open)
        for (int p = 0; p < 3; p++) begin
          if (level[p] == LVL_POS) win_pos[p]++;
          if (level[p] == LVL_NEG) win_neg[p]++;
        end
      // the new reference is visible three clocks after the strobe and
      // reaches level one clock later: windows run from there
      if (ss == 3) begin
        if (win_open) begin
          for (int p = 0; p < 3; p++) begin
            check(win_pos[p] == exp_pos(win_ref[p]) && win_neg[p] == exp_neg(win_ref[p]),
                  $sformatf("phase %0d ref %0d: %0d clocks at +, %0d at -", p, win_ref[p], win_pos[p], win_neg[p]));
          end
          n_duty_checked++;
        end
        win_ref[0] = int'(ref_a); win_ref[1] = int'(ref_b); win_ref[2] = int'(ref_c);
        for (int p = 0; p < 3; p++) begin win_pos[p] = 0; win_neg[p] = 0; end
        win_open = 1;
      end
    end
  end

  task automatic run_point(input int m, input int f);
    if (int'(mi) != m) n_mi_change++;
    if (int'(frq) != f) n_frq_change++;
    // change the inputs right after a strobe so a sample never mixes old and new values
    @(posedge clk iff samp);
    @(negedge clk);
    mi = 10'(m); frq = 16'(f);
    wraps_since_change = 0;
    // wait for two overflows: one to align, one to measure a whole cycle
    repeat (2) @(posedge clk iff cycle_wrap);
    // and a while longer so the next cycle starts under the same inputs
    repeat (20) @(posedge clk iff samp);
  endtask

  initial begin
    for (int p = 0; p < 3; p++) begin
      held[p] = 0; prev_defined[p] = 1'b0;
      for (int l = 0; l < 3; l++) n_level[p][l] = 0;
    end
    repeat (4) @(posedge clk);
    // the carrier leaves reset at its valley, so the first sample is taken
    // in the first clock after reset
    @(negedge clk) begin rst = 1'b0; since_samp = 0; last_samp_t = 0; model_acc = int'(frq); end
    run_point(400, 327);    // 50 Hz example
    run_point(400, 300);    // magnitude 400, step 300
    run_point(700, 100);    // magnitude 700, step 100
    run_point(1023, 1500);  // over-modulation
    for (int p = 0; p < 3; p++)
      for (int l = 0; l < 3; l++)
        check(n_level[p][l] > 0, $sformatf("phase %0d level %0d never seen", p, l));
    check(n_dead > 0, "dead band never inserted");
    check(n_duty_checked > 1000, "per-period volt-seconds checked");
    check(n_wrap >= 8, "accumulator wraps");
    check(n_cycles_checked == 4, "one whole sine cycle timed at every operating point");
    check(n_clamp > 0, "reference never clamped");
    check(n_mi_change >= 2, "magnitude changes");
    check(n_frq_change >= 3, "frequency changes");
    $display("mechanisms: dead bands %0d, wraps %0d, clamped samples %0d, mi changes %0d, frq changes %0d, periods checked %0d",
             n_dead, n_wrap, n_clamp, n_mi_change, n_frq_change, n_duty_checked);
    for (int p = 0; p < 3; p++)
      $display("phase %0d clocks at -, 0, +: %0d %0d %0d", p, n_level[p][0], n_level[p][1], n_level[p][2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
