// sine_lut -- quarter-wave sine ROM with a full-wave interface.
//
// The document specifies a quarter-wave sine ROM indexed by the MSBs of the
// sweep phase accumulator, sized at roughly 16-72 Kbit. This design stores
// sin(x) for x in [0, pi/2] at 2^(PHASE_W-2)+1 points as unsigned magnitudes
// of OUT_W-1 bits (2049 x 23 bit = 47 Kbit with the defaults) and unfolds the
// other three quadrants by mirroring the index and negating the result:
//   quadrant 0: +rom[i]   1: +rom[Q-i]   2: -rom[i]   3: -rom[Q-i]
// where Q = 2^(PHASE_W-2) and i is the phase without its two MSBs.
// Output: round(sin(2*pi*phase/2^PHASE_W) * (2^(OUT_W-1)-1)), two's complement,
// registered: `sine` is valid one clock after `phase` (when `en` is high).
// The ROM contents are computed at start-up from $sin; the table size and the
// rounding are this design's choice.
module sine_lut #(
  parameter int unsigned PHASE_W = 13,
  parameter int unsigned OUT_W   = 24
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [PHASE_W-1:0]       phase,
  output logic signed [OUT_W-1:0]  sine
);
  localparam int unsigned QN  = 1 << (PHASE_W - 2);
  localparam int unsigned IW  = PHASE_W - 2;
  localparam real         PI  = 3.14159265358979323846;
  localparam real         AMP = real'((longint'(1) << (OUT_W - 1)) - 1);

  logic [OUT_W-2:0] rom [QN+1];

  initial begin
    for (int i = 0; i <= int'(QN); i++)
      rom[i] = (OUT_W-1)'($rtoi($sin(PI / 2.0 * real'(i) / real'(QN)) * AMP + 0.5));
  end

  logic [1:0]    quad;
  logic [IW-1:0] idx;
  logic [IW:0]   addr;

  assign quad = phase[PHASE_W-1 -: 2];
  assign idx  = phase[IW-1:0];
  assign addr = quad[0] ? ((IW+1)'(QN) - {1'b0, idx}) : {1'b0, idx};

  always_ff @(posedge clk) begin
    if (en) begin
      if (quad[1]) sine <= -$signed({1'b0, rom[addr]});
      else         sine <=  $signed({1'b0, rom[addr]});
    end
  end
endmodule
