// i2s_clock_div -- derives the I2S bit clock and frame clock from the codec
// master clock XCK.
//
// The document fixes XCK = 12.288 MHz, BCLK = 3.072 MHz (derived from XCK) and
// LRCK = 48 kHz (derived from BCLK), which gives the defaults XCK/4 and 64 BCLK
// periods per frame (32 bit slots per channel). Both outputs are registers in
// the XCK domain: BCLK toggles every BCLK_DIV/2 XCK cycles and LRCK changes
// together with a BCLK falling edge, as I2S requires. LRCK low is the left
// channel. `bclk_rise`/`bclk_fall` are one-XCK-cycle strobes that coincide
// with the register updates of BCLK, so logic in the XCK domain can act on the
// edges without sampling a clock; `lr_toggle` marks the falling edge that
// starts a new channel slot. Counters and strobes are this design's own.
module i2s_clock_div #(
  parameter int unsigned BCLK_DIV    = 4,   // XCK cycles per BCLK period (even)
  parameter int unsigned BCLK_PER_LR = 64   // BCLK periods per LRCK period (even)
) (
  input  logic xck,
  input  logic rst,
  output logic bclk,
  output logic lrck,
  output logic bclk_rise,   // high in the XCK cycle in which bclk goes 0->1
  output logic bclk_fall,   // high in the XCK cycle in which bclk goes 1->0
  output logic lr_toggle    // high with the bclk_fall at which lrck changes
);
  localparam int unsigned HALF = BCLK_DIV / 2;
  localparam int unsigned DW   = $clog2(HALF) + 1;
  localparam int unsigned BW   = $clog2(BCLK_PER_LR);

  logic [DW-1:0] div_cnt;
  logic [BW-1:0] bit_cnt;
  logic          toggle;

  assign toggle    = (div_cnt == DW'(HALF - 1));
  assign bclk_rise = toggle && !bclk;
  assign bclk_fall = toggle &&  bclk;
  assign lr_toggle = bclk_fall &&
                     (bit_cnt == BW'(BCLK_PER_LR/2 - 1) || bit_cnt == BW'(BCLK_PER_LR - 1));

  always_ff @(posedge xck) begin
    if (rst) begin
      div_cnt <= '0;
      bit_cnt <= '0;
      bclk    <= 1'b0;
      lrck    <= 1'b0;
    end else begin
      div_cnt <= toggle ? '0 : div_cnt + 1'b1;
      if (toggle) bclk <= ~bclk;
      if (bclk_fall) begin
        bit_cnt <= (bit_cnt == BW'(BCLK_PER_LR - 1)) ? '0 : bit_cnt + 1'b1;
        if (lr_toggle) lrck <= ~lrck;
      end
    end
  end

  initial assert (BCLK_DIV >= 2 && BCLK_DIV % 2 == 0) else $error("BCLK_DIV must be even");
endmodule
