// wm8731_model -- behavioural model of the codec's digital audio interface
// (I2S slave, 24-bit, standard I2S format) for simulation only.
//
// It watches BCLK and LRCK driven by the design. DAC side: on each BCLK
// rising edge it samples DACDAT; the 24 bits after the one-bit delay slot of
// each LRCK half-period form a word (LRCK low = left). After the right word
// it presents the frame on dac_l/dac_r and pulses dac_valid (one BCLK cycle).
// ADC side: at the start of every left slot it latches adc_l/adc_r, pulses
// adc_take, and shifts them out on ADCDAT (changes on BCLK falling edges, MSB
// one BCLK after the LRCK change, zeros after bit 24).
module wm8731_model (
  input  logic               bclk,
  input  logic               lrck,
  input  logic               dacdat,
  output logic               adcdat,
  input  logic signed [23:0] adc_l,
  input  logic signed [23:0] adc_r,
  output logic               adc_take,
  output logic signed [23:0] dac_l,
  output logic signed [23:0] dac_r,
  output logic               dac_valid
);
  int unsigned fall_idx = 99, rise_idx = 99;
  logic lr_fall = 1'b0, lr_rise = 1'b0;
  logic [23:0] adc_sh_l = '0, adc_sh_r = '0, dac_sh = '0, dac_word_l = '0;
  logic chan_rise = 1'b0;

  initial begin
    adcdat = 1'b0; adc_take = 1'b0; dac_l = '0; dac_r = '0; dac_valid = 1'b0;
  end

  always @(negedge bclk) begin
    adc_take <= 1'b0;
    if (lrck != lr_fall) begin
      fall_idx = 0;
      if (!lrck) begin
        adc_sh_l = adc_l;
        adc_sh_r = adc_r;
        adc_take <= 1'b1;
      end
    end else if (fall_idx < 99) fall_idx++;
    lr_fall = lrck;
    if (fall_idx >= 1 && fall_idx <= 24)
      adcdat <= lrck ? adc_sh_r[24 - fall_idx] : adc_sh_l[24 - fall_idx];
    else
      adcdat <= 1'b0;
  end

  always @(posedge bclk) begin
    dac_valid <= 1'b0;
    if (lrck != lr_rise) begin
      rise_idx = 0;
      chan_rise = lrck;
    end else if (rise_idx < 99) rise_idx++;
    lr_rise = lrck;
    if (rise_idx >= 1 && rise_idx <= 24) begin
      dac_sh = {dac_sh[22:0], dacdat};
      if (rise_idx == 24) begin
        if (!chan_rise) dac_word_l = dac_sh;
        else begin
          dac_l <= dac_word_l;
          dac_r <= dac_sh;
          dac_valid <= 1'b1;
        end
      end
    end
  end
endmodule
