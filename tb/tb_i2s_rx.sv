// tb_i2s_rx -- a behavioural I2S codec serializes random stereo words onto
// ADCDAT from the BCLK/LRCK the design generates; the testbench checks that
// i2s_rx delivers each word intact, in order, once per 256-XCK frame, with
// `out_valid` a one-cycle pulse.
module tb_i2s_rx;
  logic xck = 0, rst = 1;
  logic bclk, lrck, bclk_rise, bclk_fall, lr_toggle, adcdat, adc_take, dac_valid, out_valid;
  logic signed [23:0] adc_l, adc_r, dac_l, dac_r, out_l, out_r;
  int checks = 0, failures = 0;
  logic [47:0] sent [$];
  int words = 0, last_valid = -1, cyc = 0;
  bit synced = 0;

  always #40.69 xck = ~xck;
  always @(posedge xck) cyc++;

  i2s_clock_div u_div (.xck, .rst, .bclk, .lrck, .bclk_rise, .bclk_fall, .lr_toggle);
  i2s_rx dut (.clk(xck), .rst, .lrck, .bclk_rise, .bclk_fall, .lr_toggle, .adcdat,
              .out_l, .out_r, .out_valid);
  wm8731_model u_codec (.bclk, .lrck, .dacdat(1'b0), .adcdat, .adc_l, .adc_r,
                        .adc_take, .dac_l, .dac_r, .dac_valid);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  always @(posedge bclk) begin
    if (adc_take) begin
      sent.push_back({adc_l, adc_r});
      adc_l <= 24'($urandom);
      adc_r <= 24'($urandom);
    end
  end

  logic out_valid_d = 0;
  always @(posedge xck) begin
    out_valid_d <= out_valid;
    if (out_valid && out_valid_d) check(0, "out_valid longer than one cycle");
    if (!rst && out_valid) begin
      if (!synced) begin
        while (sent.size() > 0 && sent[0] != {out_l, out_r}) void'(sent.pop_front());
        if (sent.size() > 0) synced = 1;
      end
      if (synced) begin
        logic [47:0] e;
        e = sent.pop_front();
        check({out_l, out_r} == e, $sformatf("word %0d: got %h expected %h", words, {out_l, out_r}, e));
        if (last_valid >= 0) check(cyc - last_valid == 256, "not one word per frame");
        last_valid = cyc;
        words++;
      end
    end
  end

  initial begin
    adc_l = 24'sh7fffff; adc_r = -24'sh800000;
    repeat (4) @(posedge xck);
    rst = 0;
    wait (words == 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (256 * 60) @(posedge xck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
