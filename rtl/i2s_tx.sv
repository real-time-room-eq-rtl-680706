// i2s_tx -- I2S master transmitter: serializes stereo 24-bit samples onto
// the codec's DACDAT line.
//
// The FPGA is the I2S master (document, section 2): BCLK and LRCK come from
// i2s_clock_div in the same XCK domain, together with the one-cycle strobes
// `bclk_fall` and `lr_toggle`. Standard I2S framing is used (this design's
// choice, the usual WM8731 format): LRCK low = left channel, data changes on
// BCLK falling edges, MSB first, one BCLK after the LRCK transition; the 24
// data bits are followed by zeros to fill the 32-bit slot.
//
// Sample side: at the falling edge that starts a left slot the transmitter
// latches {in_l, in_r} and pulses `in_ready` for one cycle; if `in_valid` is
// low at that moment the frame is sent as silence. So one stereo sample is
// taken per 48 kHz frame and leaves the pin one frame later.
module i2s_tx #(
  parameter int unsigned W    = 24,
  parameter int unsigned SLOT = 32
) (
  input  logic                clk,        // XCK
  input  logic                rst,
  input  logic                lrck,
  input  logic                bclk_fall,
  input  logic                lr_toggle,
  input  logic signed [W-1:0] in_l,
  input  logic signed [W-1:0] in_r,
  input  logic                in_valid,
  output logic                in_ready,
  output logic                dacdat
);
  logic [SLOT-1:0] shreg;
  logic [W-1:0]    hold_r;
  logic            left_start;

  // lrck is still high in the cycle of the edge that starts the left slot
  assign left_start = lr_toggle && lrck;
  assign in_ready   = left_start;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg  <= '0;
      hold_r <= '0;
      dacdat <= 1'b0;
    end else if (bclk_fall) begin
      if (lr_toggle) begin
        dacdat <= 1'b0;                 // one-bit I2S delay slot
        if (left_start) begin
          shreg  <= in_valid ? {in_l, {(SLOT-W){1'b0}}} : '0;
          hold_r <= in_valid ? in_r : '0;
        end else begin
          shreg  <= {hold_r, {(SLOT-W){1'b0}}};
        end
      end else begin
        dacdat <= shreg[SLOT-1];
        shreg  <= {shreg[SLOT-2:0], 1'b0};
      end
    end
  end
endmodule
