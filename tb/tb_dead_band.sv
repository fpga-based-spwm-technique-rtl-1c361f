// tb_dead_band: drives a random demand with runs of many lengths and checks
// every clock against a reference written here: the outgoing gate drops one
// clock after the demand changes, the incoming gate rises only once the demand
// has been stable for DEAD clocks (DEAD + 1 clocks with both gates off), short
// pulses leave both gates off, and the two gates are never on together.
module tb_dead_band;
  localparam int DEAD = 20;
  logic clk = 1'b0, rst = 1'b1, demand = 1'b0;
  logic g_main, g_comp;
  int checks = 0, failures = 0;

  dead_band #(.DEAD_CYCLES(DEAD)) dut (.clk, .rst, .demand, .g_main, .g_comp);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int stable, run, gaps, swallowed, off_run, max_off;
    bit prev;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // stable counts edges since (and including) the last demand change seen by the DUT
    stable = 0; prev = demand; gaps = 0; swallowed = 0; off_run = 0; max_off = 0;
    for (int i = 0; i < 60; i++) begin
      run = (i % 3 == 0) ? $urandom_range(1, DEAD) : $urandom_range(DEAD + 1, 4 * DEAD);
      if (run <= DEAD) swallowed++;
      for (int k = 0; k < run; k++) begin
        @(posedge clk); #1;
        if (demand != prev) stable = 0; else if (stable < DEAD + 1) stable++;
        prev = demand;
        // gate on only after DEAD stable edges following the change edge
        check(g_main == (demand && stable == DEAD + 1), $sformatf("g_main %0d stable %0d", g_main, stable));
        check(g_comp == (!demand && stable == DEAD + 1), "g_comp");
        check(!(g_main && g_comp), "no shoot-through");
        if (!g_main && !g_comp) off_run++; else begin
          if (off_run > 0) gaps++;
          if (off_run > max_off) max_off = off_run;
          off_run = 0;
        end
        @(negedge clk);
      end
      demand = ~demand;
    end
    check(gaps > 10, "dead bands inserted");
    check(max_off >= DEAD + 1, "blanking at least DEAD+1 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
