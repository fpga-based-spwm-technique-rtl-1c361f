// dead_band: blanking time for one complementary pair of switches.
//
// demand says which switch of the pair should conduct (1: the main switch,
// 0: its complement). Whenever demand changes, both gates are off at once and
// the incoming switch is held off until demand has been stable for
// DEAD_CYCLES clocks; turn-off is never delayed. The two gates are therefore
// never on together. Timing: the outgoing gate falls one clock after demand
// changes; the incoming gate rises DEAD_CYCLES + 1 clocks after that, so both
// are off for DEAD_CYCLES + 1 clocks. A demand pulse shorter than
// DEAD_CYCLES + 1 clocks leaves both gates off.
//
// The design calls for a dead band but gives neither its length nor how it is
// made; the counter scheme and the default of 20 clocks (1 us at 50 ns) are
// this design's choices. DEAD_CYCLES must be at least 1. Reset turns both
// gates off and restarts the blanking.
module dead_band #(
  parameter int unsigned DEAD_CYCLES = 20
) (
  input  logic clk,
  input  logic rst,
  input  logic demand,
  output logic g_main,
  output logic g_comp
);

  localparam int unsigned CNT_W = $clog2(DEAD_CYCLES + 1);

  logic             dem_q;
  logic [CNT_W-1:0] cnt;
  logic             settled;

  assign settled = (cnt == CNT_W'(DEAD_CYCLES));

  always_ff @(posedge clk) begin
    if (rst) begin
      dem_q  <= demand;
      cnt    <= '0;
      g_main <= 1'b0;
      g_comp <= 1'b0;
    end else begin
      dem_q <= demand;
      if (demand != dem_q) begin
        cnt    <= '0;
        g_main <= 1'b0;
        g_comp <= 1'b0;
      end else begin
        if (!settled) cnt <= cnt + 1'b1;
        g_main <= settled &&  dem_q;
        g_comp <= settled && !dem_q;
      end
    end
  end

  a_no_shoot_through: assert property (@(posedge clk) !(g_main && g_comp));

endmodule
