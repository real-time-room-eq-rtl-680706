// i2s_rx -- I2S receiver: deserializes the codec's ADCDAT line into stereo
// 24-bit samples.
//
// Runs in the XCK domain with the BCLK/LRCK strobes of i2s_clock_div (the
// FPGA is the I2S master). Standard I2S framing, as in i2s_tx: LRCK low =
// left, the codec changes ADCDAT on BCLK falling edges and the receiver
// samples on rising edges; the MSB is the second rising edge after the LRCK
// transition and the first 24 bits of the 32-bit slot are kept.
//
// Output: when the right-channel word of a frame is complete, {out_l, out_r}
// are updated and `out_valid` pulses for one XCK cycle; the pair then stays
// stable for a whole frame (256 XCK cycles), which the clock-domain crossing
// behind it relies on. Framing details are this design's choice; the document
// gives only "deserializes ADCDAT into samples".
module i2s_rx #(
  parameter int unsigned W = 24
) (
  input  logic                clk,        // XCK
  input  logic                rst,
  input  logic                lrck,
  input  logic                bclk_rise,
  input  logic                bclk_fall,
  input  logic                lr_toggle,
  input  logic                adcdat,
  output logic signed [W-1:0] out_l,
  output logic signed [W-1:0] out_r,
  output logic                out_valid
);
  logic [W-1:0] shreg;
  logic [5:0]   rise_cnt;   // rising edges since the slot began
  logic         chan_r;     // slot being received is the right channel
  logic [W-1:0] word_l;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '0;
      rise_cnt  <= 6'd63;
      chan_r    <= 1'b0;
      word_l    <= '0;
      out_l     <= '0;
      out_r     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (bclk_fall && lr_toggle) begin
        rise_cnt <= '0;
        chan_r   <= ~lrck;          // value lrck takes at this edge
      end else if (bclk_rise) begin
        if (rise_cnt != 6'd63) rise_cnt <= rise_cnt + 1'b1;
        if (rise_cnt >= 1 && rise_cnt <= 6'(W)) begin
          shreg <= {shreg[W-2:0], adcdat};
          if (rise_cnt == 6'(W)) begin
            if (chan_r) begin
              out_l     <= word_l;
              out_r     <= {shreg[W-2:0], adcdat};
              out_valid <= 1'b1;
            end else begin
              word_l <= {shreg[W-2:0], adcdat};
            end
          end
        end
      end
    end
  end
endmodule
