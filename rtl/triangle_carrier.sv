// triangle_carrier: the two in-phase triangular carriers of three-level SPWM.
//
// An up/down counter steps once per clock through 0,1,..,CAR_MAX,CAR_MAX-1,..,1
// and repeats, so one carrier period is 2*CAR_MAX clocks. With the default
// CAR_MAX = 1000 and a 50 ns clock that is 100 us, a 10 kHz carrier, as the
// design's timing calls for. car_lo is the counter itself (0..CAR_MAX);
// car_hi is the same triangle lifted by CAR_MAX (CAR_MAX..2*CAR_MAX), the two
// carriers being in phase with a DC offset between them.
//
// samp is high for the one clock in which car_lo is 0 (the valley) and marks
// the sampling instant of the references: one sample per carrier period. The
// choice of the valley, and the synchronous active-high reset to count 0
// counting up, are this design's own.
//
// Timing: car_lo, car_hi and samp are registered; samp rises with the counter
// reaching 0, once every 2*CAR_MAX clocks.
module triangle_carrier
  import spwm_pkg::*;
#(
  parameter int unsigned CAR_MAX = CAR_MAX_DEF
) (
  input  logic          clk,
  input  logic          rst,
  output logic [CW-1:0] car_lo,
  output logic [CW-1:0] car_hi,
  output logic          samp
);

  logic [CW-1:0] cnt;
  logic          up;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      up  <= 1'b1;
    end else if (up) begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(CAR_MAX - 1)) up <= 1'b0;
    end else begin
      cnt <= cnt - 1'b1;
      if (cnt == CW'(1)) up <= 1'b1;
    end
  end

  assign car_lo = cnt;
  assign car_hi = cnt + CW'(CAR_MAX);
  assign samp   = (cnt == '0);

  // The counter never leaves its range.
  a_range: assert property (@(posedge clk) disable iff (rst) cnt <= CW'(CAR_MAX));

endmodule
