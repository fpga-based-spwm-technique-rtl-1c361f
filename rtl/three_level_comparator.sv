// three_level_comparator: turns one phase reference into an NPC leg state.
//
// The reference is compared with the upper and the lower carrier:
//   ref > car_hi            -> +Vdc/2 : S1 and S2 on
//   car_hi >= ref > car_lo  ->  0     : S2 and S1' on
//   ref <= car_lo           -> -Vdc/2 : S1' and S2' on
// S1/S1' and S2/S2' are complementary pairs, so the leg is fully described by
// the two demands s1_on (S1 on, S1' off) and s2_on (S2 on, S2' off); level
// gives the same state as an enum. The three-level rule is the design's; ties
// resolving to the lower level and the register stage are this design's own.
//
// Timing: outputs registered, one clock after the inputs. Reset gives the
// zero level (S2 and S1' demanded).
module three_level_comparator
  import spwm_pkg::*;
#(
  parameter int unsigned W = CW
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] ref_i,
  input  logic [W-1:0] car_lo,
  input  logic [W-1:0] car_hi,
  output logic         s1_on,
  output logic         s2_on,
  output level_e       level
);

  logic above_hi, above_lo;

  assign above_hi = ref_i > car_hi;
  assign above_lo = ref_i > car_lo;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_on <= 1'b0;
      s2_on <= 1'b1;
      level <= LVL_ZERO;
    end else begin
      s1_on <= above_hi;
      s2_on <= above_lo;
      level <= above_hi ? LVL_POS : (above_lo ? LVL_ZERO : LVL_NEG);
    end
  end

endmodule
