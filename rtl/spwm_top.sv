// spwm_top: three-phase sine-triangle PWM for a neutral-point-clamped
// three-level inverter.
//
// One triangle_carrier makes the lower (0..CAR_MAX) and upper
// (CAR_MAX..2*CAR_MAX) carriers at 10 kHz and a sampling strobe once per
// carrier period. On each strobe the phase_accumulator adds the frequency step
// frq; its top bits address three sine_lut copies, phase b and c reading 85
// and 170 of 256 locations ahead of phase a. Each sample is scaled by the
// magnitude mi and centred on the carrier scale (amplitude_scaler), compared
// with both carriers (three_level_comparator), and each of the two
// complementary switch pairs of the leg gets a dead band.
//
// Interface: clk is the 50 ns system clock, rst a synchronous active-high
// reset, mi the magnitude multiplier and frq the frequency step
// (f = frq * 10 kHz / 65536; 327 gives 50 Hz). pulse[4*p + 0..3] are the gates
// S1, S2, S1', S2' of phase p = a, b, c. Carriers, references, commanded
// levels and the strobe are brought out for observation.
//
// Timing: a new sample reaches the references 3 clocks after samp (accumulator,
// table, scaler) and is held for the rest of the carrier period (regular
// sampling). A carrier crossing reaches level one clock later and the gates
// one clock after that (turn-off) or DEAD_CYCLES + 2 clocks after (turn-on).
// The structure, carrier, table and step arithmetic follow the design; the
// scaling law, the sampling instant, the pulse order and the dead-band length
// are this design's choices.
module spwm_top
  import spwm_pkg::*;
#(
  parameter int unsigned CAR_MAX     = CAR_MAX_DEF,
  parameter int unsigned ACC_W       = ACC_W_DEF,
  parameter int unsigned PHASE_B_OFF = PH_B_OFF,
  parameter int unsigned PHASE_C_OFF = PH_C_OFF,
  parameter int unsigned MI_W        = 10,
  parameter int unsigned MI_SHIFT    = 8,
  parameter int unsigned DEAD_CYCLES = 20
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [MI_W-1:0]  mi,
  input  logic [ACC_W-1:0] frq,
  output logic [11:0]      pulse,
  output logic [CW-1:0]    car_lo,
  output logic [CW-1:0]    car_hi,
  output logic [CW-1:0]    ref_a,
  output logic [CW-1:0]    ref_b,
  output logic [CW-1:0]    ref_c,
  output level_e           level [3],
  output logic             samp,
  output logic             cycle_wrap
);

  logic [LUT_AW-1:0]        ramp [3];
  logic signed [LUT_DW-1:0] sine [3];
  logic [CW-1:0]            refs [3];
  leg_gates_t               gates [3];

  triangle_carrier #(.CAR_MAX(CAR_MAX)) u_carrier (
    .clk, .rst, .car_lo, .car_hi, .samp
  );

  phase_accumulator #(
    .ACC_W(ACC_W), .ADDR_W(LUT_AW),
    .PHASE_B_OFF(PHASE_B_OFF), .PHASE_C_OFF(PHASE_C_OFF)
  ) u_accum (
    .clk, .rst, .en(samp), .frq, .ramp, .wrap(cycle_wrap)
  );

  for (genvar p = 0; p < 3; p++) begin : g_phase
    logic s1_on, s2_on;

    sine_lut u_lut (.clk, .addr(ramp[p]), .data(sine[p]));

    amplitude_scaler #(
      .CAR_MAX(CAR_MAX), .MI_W(MI_W), .MI_SHIFT(MI_SHIFT), .SINE_W(LUT_DW)
    ) u_scale (
      .clk, .sine(sine[p]), .mi, .ref_o(refs[p])
    );

    three_level_comparator #(.W(CW)) u_cmp (
      .clk, .rst, .ref_i(refs[p]), .car_lo, .car_hi,
      .s1_on, .s2_on, .level(level[p])
    );

    dead_band #(.DEAD_CYCLES(DEAD_CYCLES)) u_db1 (
      .clk, .rst, .demand(s1_on), .g_main(gates[p].s1), .g_comp(gates[p].s1n)
    );

    dead_band #(.DEAD_CYCLES(DEAD_CYCLES)) u_db2 (
      .clk, .rst, .demand(s2_on), .g_main(gates[p].s2), .g_comp(gates[p].s2n)
    );

    assign pulse[4*p + 0] = gates[p].s1;
    assign pulse[4*p + 1] = gates[p].s2;
    assign pulse[4*p + 2] = gates[p].s1n;
    assign pulse[4*p + 3] = gates[p].s2n;
  end

  assign ref_a = refs[0];
  assign ref_b = refs[1];
  assign ref_c = refs[2];

endmodule
