// tb_sine_lut: reads all 256 locations and compares each with
// round(255*sin(2*pi*k/256)) worked out in the testbench, and checks the
// printed anchor points (0 at 0 degrees, +255 at 90, -255 at 270), odd
// symmetry and the one-clock read latency.
module tb_sine_lut;
  logic clk = 1'b0;
  logic [7:0] addr = '0;
  logic signed [8:0] data;
  int checks = 0, failures = 0;
  int got [256];

  sine_lut dut (.clk, .addr, .data);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v;
    int e;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk) addr = 8'(k);
      @(posedge clk); #1;
      got[k] = int'(data);
      v = 255.0 * $sin(2.0 * 3.141592653589793 * k / 256.0);
      e = (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
      check(got[k] == e, $sformatf("entry %0d = %0d, expected %0d", k, got[k], e));
    end
    check(got[0] == 0, "sin 0 = 0");
    check(got[64] == 255, "sin 90 = 255");
    check(got[192] == -255, "sin 270 = -255");
    for (int k = 1; k < 128; k++) check(got[k] == -got[256 - k], "odd symmetry");
    // latency: address change is not visible before the next edge
    @(negedge clk) addr = 8'd64;
    @(posedge clk); #1;
    @(negedge clk) addr = 8'd192;
    #1 check(data == 255, "registered read holds until the clock");
    @(posedge clk); #1 check(data == -255, "registered read updates on the clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
