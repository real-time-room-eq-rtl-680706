// tb_i2s_clock_div -- checks the default divider ratios (XCK/4 for BCLK,
// 64 BCLK per LRCK, so 256 XCK per frame), that LRCK changes only together
// with a falling BCLK edge, that the edge strobes match the edges, and that
// the LRCK duty cycle is 50 %.
module tb_i2s_clock_div;
  logic xck = 0, rst = 1;
  logic bclk, lrck, bclk_rise, bclk_fall, lr_toggle;
  logic bclk_d, lrck_d;
  int checks = 0, failures = 0;
  int cyc = 0, last_bclk_rise = -1, last_lr = -1, lr_changes = 0, last_lr_len = 0;

  always #40.69 xck = ~xck;

  i2s_clock_div dut (.xck, .rst, .bclk, .lrck, .bclk_rise, .bclk_fall, .lr_toggle);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", cyc, msg); end
  endtask

  initial begin
    repeat (3) @(posedge xck);
    #1 rst = 0;                            // away from the clock edge
    @(posedge xck); #1;
    bclk_d = bclk; lrck_d = lrck;
    repeat (256 * 6) begin
      // strobes are sampled in the cycle before the edge takes effect
      logic rise_s, fall_s, tog_s;
      rise_s = bclk_rise; fall_s = bclk_fall; tog_s = lr_toggle;
      @(posedge xck); #1;
      cyc++;
      check((bclk && !bclk_d) == rise_s, "bclk_rise strobe does not match edge");
      check((!bclk && bclk_d) == fall_s, "bclk_fall strobe does not match edge");
      check((lrck != lrck_d) == tog_s, "lr_toggle does not match lrck change");
      if (lrck != lrck_d) check(!bclk && bclk_d, "lrck changed without a falling bclk edge");
      if (bclk && !bclk_d) begin
        if (last_bclk_rise >= 0) check(cyc - last_bclk_rise == 4, "bclk period is not 4 xck");
        last_bclk_rise = cyc;
      end
      if (lrck != lrck_d) begin
        if (last_lr >= 0) check(cyc - last_lr == 128, "lrck half period is not 128 xck");
        last_lr = cyc;
        lr_changes++;
      end
      bclk_d = bclk; lrck_d = lrck;
    end
    check(lr_changes >= 10, "too few lrck changes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge xck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
