// tb_i2s_tx -- drives random stereo words into i2s_tx (clocked by the
// default i2s_clock_div) and checks, with a behavioural I2S codec that
// decodes DACDAT from the BCLK/LRCK pins, that every frame arrives intact and
// in order, one word per 256-XCK frame; then checks that a frame offered
// without `in_valid` is sent as silence.
module tb_i2s_tx;
  logic xck = 0, rst = 1;
  logic bclk, lrck, bclk_rise, bclk_fall, lr_toggle, dacdat, adcdat, adc_take, dac_valid, in_ready;
  logic signed [23:0] in_l, in_r, dac_l, dac_r;
  logic in_valid = 1;
  int checks = 0, failures = 0;
  logic [47:0] sent [$];
  int frames = 0, last_ready = -1, cyc = 0;

  always #40.69 xck = ~xck;
  always @(posedge xck) cyc++;

  i2s_clock_div u_div (.xck, .rst, .bclk, .lrck, .bclk_rise, .bclk_fall, .lr_toggle);
  i2s_tx dut (.clk(xck), .rst, .lrck, .bclk_fall, .lr_toggle, .in_l, .in_r, .in_valid,
              .in_ready, .dacdat);
  wm8731_model u_codec (.bclk, .lrck, .dacdat, .adcdat, .adc_l(24'sd0), .adc_r(24'sd0),
                        .adc_take, .dac_l, .dac_r, .dac_valid);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // a new word is presented after each take
  always @(posedge xck) begin
    if (!rst && in_ready) begin
      sent.push_back(in_valid ? {in_l, in_r} : 48'd0);
      if (last_ready >= 0) check(cyc - last_ready == 256, "in_ready not once per 256 XCK");
      last_ready = cyc;
      in_l <= 24'($urandom);
      in_r <= 24'($urandom);
    end
  end

  // the first DAC frame the codec decodes may be a partial one from reset
  bit synced = 0;
  always @(posedge bclk) begin
    if (dac_valid) begin
      logic [47:0] e;
      if (!synced) begin
        // drop words until the codec output matches the head of the queue
        while (sent.size() > 0 && sent[0] != {dac_l, dac_r}) void'(sent.pop_front());
        if (sent.size() > 0) synced = 1;
      end
      if (synced) begin
        e = sent.pop_front();
        check({dac_l, dac_r} == e, $sformatf("frame %0d: got %h expected %h", frames, {dac_l, dac_r}, e));
        frames++;
      end
    end
  end

  initial begin
    in_l = 24'sh123456; in_r = -24'sh0abcde;
    repeat (4) @(posedge xck);
    rst = 0;
    wait (frames == 40);
    check(synced, "never synchronized");
    @(negedge xck); in_valid = 0;
    wait (frames == 45);
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
