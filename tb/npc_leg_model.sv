// npc_leg_model: behavioural model of one neutral-point-clamped inverter leg,
// used only by testbenches; it is not synthesizable hardware but stands in
// for four IGBTs and two clamping diodes.
//
// From the four gate signals it derives the leg's output level in units of
// Vdc/2: +1 with S1 and S2 on, 0 with S2 and S1' on, -1 with S1' and S2' on.
// Any other pattern leaves the level to the load current (defined = 0), as
// during a dead band. fault flags the patterns that would damage the leg: a
// complementary pair on together (shoot-through of half the DC link), or the
// outer switch S1 (S2') on while the inner S2 (S1') is off.
module npc_leg_model (
  input  logic              s1,
  input  logic              s2,
  input  logic              s1n,
  input  logic              s2n,
  output logic signed [1:0] van,
  output logic              defined,
  output logic              fault
);
  always_comb begin
    fault   = (s1 && s1n) || (s2 && s2n) || (s1 && !s2) || (s2n && !s1n);
    defined = 1'b1;
    van     = 2'sd0;
    unique case ({s1, s2, s1n, s2n})
      4'b1100: van = 2'sd1;
      4'b0110: van = 2'sd0;
      4'b0011: van = -2'sd1;
      default: defined = 1'b0;
    endcase
  end
endmodule
