// tb_phase_accumulator: drives random frequency steps and strobes and checks
// the three table addresses against a model accumulator kept in the testbench
// (phase a = top 8 bits, b and c 85 and 170 ahead, modulo 256), the overflow
// pulse, and that a step of 327 completes one cycle in 200 or 201 samples
// (65536/327 = 200.4), the 50 Hz case at 10 kHz sampling.
module tb_phase_accumulator;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [15:0] frq = '0;
  logic [7:0]  ramp [3];
  logic        wrap;
  int checks = 0, failures = 0;

  phase_accumulator dut (.clk, .rst, .en, .frq, .ramp, .wrap);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint model;
    bit exp_wrap;
    int samples, wraps, first_wrap, second_wrap;
    model = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // random steps and strobes
    for (int i = 0; i < 3000; i++) begin
      en  <= ($urandom_range(0, 2) == 0);
      frq <= 16'($urandom);
      @(posedge clk); #1;
      exp_wrap = 1'b0;
      if (en) begin
        exp_wrap = (model + frq) >= 65536;
        model = (model + frq) % 65536;
      end
      check(wrap == exp_wrap, "wrap");
      check(ramp[0] == 8'(model >> 8), "ramp a");
      check(ramp[1] == 8'((model >> 8) + 85), "ramp b");
      check(ramp[2] == 8'((model >> 8) + 170), "ramp c");
    end
    // 50 Hz step: count samples between overflows
    @(negedge clk) begin rst = 1'b1; en = 1'b0; end
    @(negedge clk) begin rst = 1'b0; frq = 16'd327; end samples = 0; wraps = 0; first_wrap = 0; second_wrap = 0;
    while (wraps < 3) begin
      @(negedge clk) en = 1'b1;
      @(posedge clk); #1;
      samples++;
      if (wrap) begin
        wraps++;
        if (wraps == 2) first_wrap = samples;
        if (wraps == 3) second_wrap = samples;
      end
      @(negedge clk) en = 1'b0;
      @(posedge clk);
    end
    check(second_wrap - first_wrap inside {200, 201}, $sformatf("cycle length %0d", second_wrap - first_wrap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
