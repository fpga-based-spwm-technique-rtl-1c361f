// sine_lut: one full sine cycle in 2^ADDR_W signed samples.
//
// Entry k holds round(PEAK * sin(2*pi*k / 2^ADDR_W)) as a DATA_W-bit two's
// complement number: 0 at k = 0, +PEAK a quarter of the way round and -PEAK at
// three quarters. The defaults are the design's: 256 locations of 9 bits
// including the sign, peaks of +/-255. The table is computed from that formula
// at elaboration, so it synthesizes to a ROM with no data file.
//
// Timing: synchronous read, data is valid one clock after addr (block-RAM
// style, this design's choice).
module sine_lut
  import spwm_pkg::*;
#(
  parameter int unsigned ADDR_W = LUT_AW,
  parameter int unsigned DATA_W = LUT_DW,
  parameter int unsigned PEAK   = LUT_PEAK
) (
  input  logic                     clk,
  input  logic [ADDR_W-1:0]        addr,
  output logic signed [DATA_W-1:0] data
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  typedef logic signed [DATA_W-1:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    real    ang, v;
    for (int k = 0; k < DEPTH; k++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(k) / real'(DEPTH);
      v    = real'(PEAK) * $sin(ang);
      t[k] = DATA_W'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
    return t;
  endfunction

  localparam table_t ROM = build_table();

  always_ff @(posedge clk) data <= ROM[addr];

endmodule
