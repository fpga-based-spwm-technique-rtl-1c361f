// tb_amplitude_scaler: random sine samples and magnitudes against the scaling
// law worked out here with plain integer division (floor towards minus
// infinity), plus the clamp at 0 and 2*CAR_MAX and the one-clock latency.
// The corner values include the magnitude 400 case, whose peak is 1398, and a
// directed sweep of near-peak samples and magnitudes across both clamp limits.
module tb_amplitude_scaler;
  logic clk = 1'b0;
  logic signed [8:0] sine = '0;
  logic [9:0] mi = '0;
  logic [10:0] ref_o;
  int checks = 0, failures = 0;

  amplitude_scaler dut (.clk, .sine, .mi, .ref_o);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int expected(int s, int m);
    int p, q, r;
    p = s * m;
    q = (p >= 0) ? p / 256 : -((-p + 255) / 256);
    r = 1000 + q;
    if (r < 0) r = 0;
    if (r > 2000) r = 2000;
    return r;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, m;
    int clamps = 0;
    for (int i = 0; i < 4000; i++) begin
      if (i < 8) begin
        s = (i % 2) ? 255 : -255;
        m = (i < 2) ? 400 : (i < 4) ? 700 : (i < 6) ? 1004 : 1023;
      end else begin
        s = $urandom_range(0, 510) - 255;
        m = $urandom_range(0, 1023);
      end
      @(negedge clk);
      sine = 9'(s); mi = 10'(m);
      @(posedge clk); #1;
      check(int'(ref_o) == expected(s, m), $sformatf("sine %0d mi %0d -> %0d, expected %0d", s, m, ref_o, expected(s, m)));
      if (expected(s, m) inside {0, 2000}) clamps++;
    end
    // directed sweep across both clamp limits (over-modulation)
    for (int m2 = 990; m2 < 1024; m2++)
      for (int s2 = 240; s2 <= 255; s2++)
        for (int sg = -1; sg <= 1; sg += 2) begin
          @(negedge clk);
          sine = 9'(sg * s2); mi = 10'(m2);
          @(posedge clk); #1;
          check(int'(ref_o) == expected(sg * s2, m2), $sformatf("clamp sweep sine %0d mi %0d -> %0d", sg * s2, m2, ref_o));
          if (expected(sg * s2, m2) inside {0, 2000}) clamps++;
        end
    check(expected(255, 400) == 1398, "reference peak for mi=400");
    check(clamps > 0, "clamp exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
