// phase_accumulator: the ramp that walks the sine table for all three phases.
//
// A free-running ACC_W-bit accumulator adds the frequency step frq once per
// sample (en high for one clock every carrier period). Its top ADDR_W bits are
// ramp a, the table address of phase a; phase b reads PHASE_B_OFF locations
// ahead and phase c PHASE_C_OFF ahead, which with a 256-entry table puts the
// three phases a third of a cycle apart. The output frequency is
//   f = frq * f_samp / 2^ACC_W,
// so with 10 kHz sampling and the default 16 bits a step of 327 gives 49.9 Hz.
// wrap pulses for one clock when the accumulator overflows, i.e. once per
// sine cycle of phase a.
//
// The accumulator split (16 bits, top 8 address the table) follows the
// design's step calculation; the synchronous reset to zero is this design's
// choice.
//
// Timing: ramp changes in the clock after en; wrap is registered with it.
module phase_accumulator
  import spwm_pkg::*;
#(
  parameter int unsigned ACC_W       = ACC_W_DEF,
  parameter int unsigned ADDR_W      = LUT_AW,
  parameter int unsigned PHASE_B_OFF = PH_B_OFF,
  parameter int unsigned PHASE_C_OFF = PH_C_OFF
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [ACC_W-1:0]  frq,
  output logic [ADDR_W-1:0] ramp [3],
  output logic              wrap
);

  logic [ACC_W-1:0] acc;
  logic [ACC_W:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, frq};

  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      wrap <= 1'b0;
    end else begin
      wrap <= 1'b0;
      if (en) begin
        acc  <= sum[ACC_W-1:0];
        wrap <= sum[ACC_W];
      end
    end
  end

  assign ramp[0] = acc[ACC_W-1 -: ADDR_W];
  assign ramp[1] = acc[ACC_W-1 -: ADDR_W] + ADDR_W'(PHASE_B_OFF);
  assign ramp[2] = acc[ACC_W-1 -: ADDR_W] + ADDR_W'(PHASE_C_OFF);

endmodule
