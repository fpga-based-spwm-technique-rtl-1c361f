// amplitude_scaler: sets the magnitude of one phase reference.
//
// The signed sine sample is multiplied by the unsigned integer magnitude mi,
// shifted right by MI_SHIFT (arithmetic, so it rounds towards minus infinity)
// and lifted by CAR_MAX so that the reference lives on the same 0..2*CAR_MAX
// scale as the two carriers, centred between them:
//   ref_o = clamp(CAR_MAX + (sine * mi) >>> MI_SHIFT, 0, 2*CAR_MAX)
// With the defaults, mi = 1004 gives a full-scale reference (modulation index
// 1) and mi = 400 a peak of 1398. Multiplying by an integer magnitude follows
// the design; the shift, the offset and the clamp (over-modulation saturates
// at the carrier peaks) are this design's choices.
//
// Timing: one register stage; ref_o follows sine and mi by one clock.
module amplitude_scaler
  import spwm_pkg::*;
#(
  parameter int unsigned CAR_MAX  = CAR_MAX_DEF,
  parameter int unsigned MI_W     = 10,
  parameter int unsigned MI_SHIFT = 8,
  parameter int unsigned SINE_W   = LUT_DW
) (
  input  logic                     clk,
  input  logic signed [SINE_W-1:0] sine,
  input  logic [MI_W-1:0]          mi,
  output logic [CW-1:0]            ref_o
);

  localparam int unsigned PW = SINE_W + MI_W + 1;

  logic signed [PW-1:0] prod, shifted, level;

  always_comb begin
    prod    = PW'(sine) * $signed({1'b0, mi});
    shifted = prod >>> MI_SHIFT;
    level   = shifted + PW'(CAR_MAX);
  end

  always_ff @(posedge clk) begin
    if (level < 0)                        ref_o <= '0;
    else if (level > PW'(2 * CAR_MAX))    ref_o <= CW'(2 * CAR_MAX);
    else                                  ref_o <= level[CW-1:0];
  end

endmodule
