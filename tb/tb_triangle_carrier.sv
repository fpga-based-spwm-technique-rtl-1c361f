// tb_triangle_carrier: checks the carrier counter against an independent
// reference triangle, the fixed CAR_MAX offset of the upper carrier, the
// 2*CAR_MAX-clock period (2000 clocks = 100 us at 50 ns, a 10 kHz carrier)
// and that the sampling strobe fires exactly once per period, at the valley.
module tb_triangle_carrier;
  import spwm_pkg::*;

  localparam int unsigned CAR_MAX = 1000;

  logic clk = 1'b0, rst = 1'b1;
  logic [CW-1:0] car_lo, car_hi;
  logic samp;
  int checks = 0, failures = 0;

  triangle_carrier #(.CAR_MAX(CAR_MAX)) dut (.clk, .rst, .car_lo, .car_hi, .samp);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, expv, last_samp, periods;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    // first clock after reset: count 1
    t = 1; last_samp = -1; periods = 0;
    for (int i = 0; i < 5 * 2 * CAR_MAX; i++) begin
      // reference triangle: position t in a 2*CAR_MAX period
      expv = (t % (2 * CAR_MAX) <= CAR_MAX) ? t % (2 * CAR_MAX) : 2 * CAR_MAX - t % (2 * CAR_MAX);
      check(car_lo == CW'(expv), $sformatf("car_lo %0d exp %0d", car_lo, expv));
      check(car_hi == CW'(expv + CAR_MAX), "car_hi offset");
      check(samp == (expv == 0), "samp at valley");
      if (samp) begin
        if (last_samp >= 0) begin
          check(t - last_samp == 2 * CAR_MAX, "strobe period 2*CAR_MAX");
          periods++;
        end
        last_samp = t;
      end
      @(posedge clk); #1;
      t++;
    end
    check(periods == 4, "four full periods seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
