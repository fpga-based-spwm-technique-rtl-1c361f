// spwm_pkg: types and constants shared by the three-level SPWM generator.
//
// The numbers follow the design's timing budget: a 50 ns clock, a triangular
// carrier that counts 1000 steps each way (10 kHz), a 256-entry 9-bit sine
// table with peaks of +/-255 and a 16-bit phase accumulator whose step for
// 50 Hz is 327 (65536/200). The level encoding and the gate bundle are this
// design's own choices.
package spwm_pkg;

  // Carrier amplitude in counts: 100 us period / 2 / 50 ns.
  localparam int unsigned CAR_MAX_DEF = 1000;
  // Width that holds 0 .. 2*CAR_MAX (the upper carrier and the references).
  localparam int unsigned CW = 11;

  // Sine table geometry.
  localparam int unsigned LUT_AW   = 8;
  localparam int unsigned LUT_DW   = 9;
  localparam int unsigned LUT_PEAK = 255;

  // Phase accumulator and the phase offsets of legs b and c (256/3 rounded down).
  localparam int unsigned ACC_W_DEF   = 16;
  localparam int unsigned PH_B_OFF    = 85;
  localparam int unsigned PH_C_OFF    = 170;

  // Output level of one NPC leg.
  typedef enum logic [1:0] {
    LVL_NEG  = 2'b00,   // S1' and S2' on : -Vdc/2
    LVL_ZERO = 2'b01,   // S2  and S1' on :  0
    LVL_POS  = 2'b10    // S1  and S2  on : +Vdc/2
  } level_e;

  // Gate signals of one leg, in the order of the leg from the positive rail down.
  typedef struct packed {
    logic s1;
    logic s2;
    logic s1n;   // S1'
    logic s2n;   // S2'
  } leg_gates_t;

endpackage
