// tb_three_level_comparator: random references and carrier positions against
// the three-level rule (above the upper carrier +, between 0, otherwise -),
// with equal values forced now and then, and the reset state.
module tb_three_level_comparator;
  import spwm_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [10:0] ref_i = '0, car_lo = '0, car_hi = '0;
  logic s1_on, s2_on;
  level_e level;
  int checks = 0, failures = 0;

  three_level_comparator dut (.clk, .rst, .ref_i, .car_lo, .car_hi, .s1_on, .s2_on, .level);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, c, n_pos = 0, n_zero = 0, n_neg = 0;
    @(posedge clk); #1;
    check(level == LVL_ZERO && !s1_on && s2_on, "reset level");
    rst = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      c = $urandom_range(0, 1000);
      case ($urandom_range(0, 5))
        0:       r = c;
        1:       r = c + 1000;
        default: r = $urandom_range(0, 2000);
      endcase
      @(negedge clk);
      ref_i = 11'(r); car_lo = 11'(c); car_hi = 11'(c + 1000);
      @(posedge clk); #1;
      if (r > c + 1000) begin
        n_pos++;
        check(level == LVL_POS && s1_on && s2_on, $sformatf("+ level ref %0d car %0d", r, c));
      end else if (r > c) begin
        n_zero++;
        check(level == LVL_ZERO && !s1_on && s2_on, $sformatf("0 level ref %0d car %0d", r, c));
      end else begin
        n_neg++;
        check(level == LVL_NEG && !s1_on && !s2_on, $sformatf("- level ref %0d car %0d", r, c));
      end
    end
    check(n_pos > 0 && n_zero > 0 && n_neg > 0, "all three levels seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
