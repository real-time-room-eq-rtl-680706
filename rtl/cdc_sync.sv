// cdc_sync -- multi-flop synchronizer for a single-bit level crossing into
// the clock domain of `clk`.
//
// The input is sampled by a chain of STAGES flip-flops; the last one drives
// `q`, so a change of `d` appears at `q` after STAGES to STAGES+1 edges of
// `clk`. The two-stage default follows the design document ("2-flip-flop
// synchronizers for single-bit status"). Only levels, or toggles held for
// several destination cycles, may be passed through it. `rst` (synchronous,
// active high) loads RESET_VAL into every stage; its polarity and the reset
// value are this design's choice.
module cdc_sync #(
  parameter int unsigned STAGES    = 2,
  parameter bit          RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic [STAGES-1:0] chain;

  always_ff @(posedge clk) begin
    if (rst) chain <= {STAGES{RESET_VAL}};
    else     chain <= {chain[STAGES-2:0], d};
  end

  assign q = chain[STAGES-1];

  initial assert (STAGES >= 2) else $error("cdc_sync needs at least two stages");
endmodule
