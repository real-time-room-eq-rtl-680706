// tb_room_eq_body.svh -- end-to-end test body shared by the reduced-size and
// the full-size testbench of room_eq_peripheral. The including module sets
//   N_TB         FFT length the DUT is built with
//   SWEEP_TB     sweep length written to SWEEP_LEN (0: keep the reset value)
//   OVF_LIMIT    usable FIFO depth for the overflow run
//   OVF_SWEEP    sweep length of the overflow run
//   TIMEOUT_US   watchdog in microseconds of simulated time
// and instantiates the DUT as `dut` (its ports named after the signals below).
//
// The environment: a 50 MHz system clock, a 12.288 MHz XCK standing in for the
// PLL, a behavioural codec on the I2S pins, a behavioural dual-clock FIFO and
// a behavioural FFT core. The HPS is played by Avalon-MM read/write tasks.
//
// Sequence and what is checked:
//  1 overflow: the FIFO is limited to OVF_LIMIT words and a sweep longer than
//    that is run; the sequencer must end in ERROR with STATUS.capture_overflow;
//    the HPS then reads the captured words through CAPTURE_DATA and they must
//    equal the first mic samples the codec sent after the sweep began; then a
//    soft reset must return the sequencer to IDLE.
//  2 calibration: codec in loopback (ADC = previous DAC frame / 2); sweep,
//    capture, FFT; the irq (fft_done enabled) must rise; the DAC must carry
//    exactly SWEEP_LEN sweep frames; the FFT core must have received N
//    consecutive mic samples; all N/2+1 bins and the exponent read through
//    FFT_DATA_RE/IM/FFT_EXPONENT must equal what the core produced.
//  3 real-time FIR: 256 taps written through COEF_DATA, CTRL.fir_enable; the
//    codec sends random samples and the DAC frames must equal the filtered
//    input (model in the testbench) at a fixed latency of a few frames.
//  4 bypass: the DAC must equal the ADC input.
// Every mechanism (sweep, capture, overflow/ERROR, soft reset, capture
// readout, FFT, bin readout auto-increment, coefficient auto-increment, FIR,
// bypass, irq) is counted and a failure is counted for any that never ran.

  import room_eq_pkg::*;

  logic clk = 0, xck = 0, reset = 1;
  always #10 clk = ~clk;                 // 50 MHz
  always #40.69 xck = ~xck;              // 12.288 MHz

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // ---------------- DUT environment ----------------
  logic [3:0]  avs_address = '0;
  logic        avs_read = 0, avs_write = 0, avs_readdatavalid, irq;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic aud_xck, aud_bclk, aud_daclrck, aud_adclrck, aud_dacdat, aud_adcdat;
  logic capfifo_aclr, capfifo_wrreq, capfifo_wrfull, capfifo_rdreq, capfifo_rdempty;
  logic [23:0] capfifo_data, capfifo_q;
  logic fft_core_reset, fft_sink_valid, fft_sink_ready, fft_sink_sop, fft_sink_eop, fft_inverse;
  logic [23:0] fft_sink_real, fft_sink_imag, fft_source_real, fft_source_imag;
  logic fft_source_valid, fft_source_ready, fft_source_sop, fft_source_eop;
  logic [5:0] fft_source_exp;

  dcfifo_model #(.DEPTH(N_TB)) u_fifo (.aclr(capfifo_aclr), .wrclk(xck), .wrreq(capfifo_wrreq),
    .data(capfifo_data), .wrfull(capfifo_wrfull), .rdclk(clk), .rdreq(capfifo_rdreq),
    .q(capfifo_q), .rdempty(capfifo_rdempty));

  fft_core_model #(.N(N_TB)) u_core (.clk, .reset(fft_core_reset), .sink_valid(fft_sink_valid),
    .sink_ready(fft_sink_ready), .sink_sop(fft_sink_sop), .sink_eop(fft_sink_eop),
    .sink_real(fft_sink_real), .sink_imag(fft_sink_imag), .inverse(fft_inverse),
    .source_valid(fft_source_valid), .source_ready(fft_source_ready),
    .source_sop(fft_source_sop), .source_eop(fft_source_eop), .source_real(fft_source_real),
    .source_imag(fft_source_imag), .source_exp(fft_source_exp));

  logic signed [23:0] adc_l = '0, adc_r = '0, dac_l, dac_r;
  logic adc_take, dac_valid;
  wm8731_model u_codec (.bclk(aud_bclk), .lrck(aud_daclrck), .dacdat(aud_dacdat),
    .adcdat(aud_adcdat), .adc_l, .adc_r, .adc_take, .dac_l, .dac_r, .dac_valid);

  // ---------------- codec stimulus and logs ----------------
  int adc_mode = 0;                      // 0 loopback, 1 random
  logic signed [23:0] last_dac_l = '0, last_dac_r = '0;
  int adc_log_l [$], adc_log_r [$], dac_log_l [$], dac_log_r [$];

  always @(posedge aud_bclk) begin
    if (adc_take) begin
      adc_log_l.push_back(int'(adc_l));
      adc_log_r.push_back(int'(adc_r));
      if (adc_mode == 0) begin
        adc_l <= last_dac_l >>> 1;
        adc_r <= last_dac_r >>> 1;
      end else begin
        adc_l <= 24'($urandom);
        adc_r <= 24'($urandom);
      end
    end
    if (dac_valid) begin
      dac_log_l.push_back(int'(dac_l));
      dac_log_r.push_back(int'(dac_r));
      last_dac_l <= dac_l;
      last_dac_r <= dac_r;
    end
  end

  // ---------------- HPS bus tasks ----------------
  task automatic wr(reg_addr_t a, logic [31:0] d);
    @(negedge clk); avs_address = a; avs_writedata = d; avs_write = 1;
    @(negedge clk); avs_write = 0;
  endtask

  task automatic rd(reg_addr_t a, output logic [31:0] d);
    @(negedge clk); avs_address = a; avs_read = 1;
    @(negedge clk); avs_read = 0;
    while (!avs_readdatavalid) @(negedge clk);
    d = avs_readdata;
  endtask

  task automatic wait_state(seq_state_t s, int max_polls);
    logic [31:0] d;
    for (int i = 0; i < max_polls; i++) begin
      rd(REG_STATUS, d);
      if (d[10:8] == s) return;
      #(5us);
    end
    check(0, $sformatf("state %s not reached", s.name()));
  endtask

  // mechanism counters
  int n_sweep = 0, n_overflow = 0, n_soft_reset = 0, n_cap_read = 0, n_fft = 0, n_bin_read = 0,
      n_coef = 0, n_fir = 0, n_bypass = 0, n_irq = 0, n_error_state = 0;

  always @(posedge clk) if (!reset && irq) n_irq = n_irq + 1;

  // find the fixed latency L (in frames) with dac[j] == f(adc[j-L]) and check
  // all frames from `from` on; f is the FIR (taps) or identity
  int hl [128], hr [128];
  function automatic int fir_ref(ref int x [$], input int m, ref int h [128]);
    longint acc = 0;
    for (int k = 0; k < 128; k++) if (m - k >= 0) acc += longint'(h[k]) * longint'(x[m - k]);
    acc = (acc + (longint'(1) << 22)) >>> 23;
    if (acc > 8388607) acc = 8388607;
    if (acc < -8388608) acc = -8388608;
    return int'(acc);
  endfunction

  // mic sample by frame index; frames before the log started were silent
  function automatic int adc_at(int idx);
    return (idx < 0 || idx >= adc_log_l.size()) ? 0 : adc_log_l[idx];
  endfunction

  task automatic match_stream(int dac_from, int adc_from, int frames, bit use_fir, output int matched);
    int best_l = -1;
    matched = 0;
    for (int lat = 0; lat < 8 && best_l < 0; lat++) begin
      bit ok;
      ok = 1;
      for (int j = dac_from; j < dac_from + 10; j++) begin
        int m = j - (dac_from - adc_from) - lat;
        int el = use_fir ? fir_ref(adc_log_l, m, hl) : adc_log_l[m];
        int er = use_fir ? fir_ref(adc_log_r, m, hr) : adc_log_r[m];
        if (m < 0 || dac_log_l[j] != el || dac_log_r[j] != er) ok = 0;
      end
      if (ok) best_l = lat;
    end
    check(best_l >= 0, "no fixed latency found between ADC and DAC streams");
    if (best_l < 0) return;
    for (int j = dac_from; j < dac_from + frames; j++) begin
      int m = j - (dac_from - adc_from) - best_l;
      int el = use_fir ? fir_ref(adc_log_l, m, hl) : adc_log_l[m];
      int er = use_fir ? fir_ref(adc_log_r, m, hr) : adc_log_r[m];
      check(dac_log_l[j] == el && dac_log_r[j] == er,
            $sformatf("frame %0d: dac %0d,%0d expected %0d,%0d", j, dac_log_l[j], dac_log_r[j], el, er));
      if (dac_log_l[j] == el && dac_log_r[j] == er) matched++;
    end
  endtask

  initial begin
    logic [31:0] d;
    int sweep_len, adc_at_start, dac_at_start, start_idx, matched;
    bit found;
    repeat (5) @(negedge clk);
    reset = 0;
    repeat (300) @(negedge clk);          // FIR clears its delay line
    rd(REG_VERSION, d); check(d == VERSION_ID, "VERSION");
    rd(REG_TAP_COUNT, d); check(d == 128, "TAP_COUNT");

    // ---- 1: overflow ----
    u_fifo.limit = OVF_LIMIT;
    wr(REG_SWEEP_LEN, 32'(OVF_SWEEP));
    adc_at_start = adc_log_l.size();
    wr(REG_CTRL, 32'h1);
    n_sweep++;
    wait_state(SEQ_ERROR, OVF_SWEEP * 10 + 100);
    rd(REG_STATUS, d);
    check(d[ST_CAPTURE_OVF] && d[ST_SWEEP_DONE] && !d[ST_FFT_DONE], $sformatf("STATUS after overflow %h", d));
    if (d[ST_CAPTURE_OVF]) n_overflow++;
    if (d[10:8] == SEQ_ERROR) n_error_state++;
    // debug readout of the failed capture: consecutive mic samples
    wr(REG_CAPTURE_ADDR, 0);
    begin
      int words [$];
      for (int i = 0; i < OVF_LIMIT; i++) begin
        rd(REG_CAPTURE_DATA, d);
        words.push_back(int'(signed'(d)));
      end
      found = 0;
      for (int s = adc_at_start - 4; s < adc_at_start + 20 && !found; s++) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < OVF_LIMIT; i++) if (adc_at(s + i) != words[i]) ok = 0;
        if (ok) begin found = 1; start_idx = s; end
      end
      check(found, "captured words not found in the mic stream");
      if (found)
        for (int i = 0; i < OVF_LIMIT; i++)
          check(words[i] == adc_at(start_idx + i), $sformatf("captured word %0d", i));
      n_cap_read++;
    end
    rd(REG_CAPTURE_ADDR, d); check(d == OVF_LIMIT, "CAPTURE_ADDR auto-increment");
    wr(REG_CTRL, 32'h4);
    n_soft_reset++;
    rd(REG_STATUS, d); check(d[10:8] == SEQ_IDLE && d[3:0] == 0, $sformatf("STATUS after soft reset %h", d));
    u_fifo.limit = N_TB;

    // ---- 2: calibration ----
    #(100us);                             // let the last overflow-run frames leave the codec
    wr(REG_IRQ_MASK, 32'h4);
    if (SWEEP_TB != 0) wr(REG_SWEEP_LEN, 32'(SWEEP_TB));
    rd(REG_SWEEP_LEN, d); sweep_len = int'(d);
    adc_mode = 0;
    dac_at_start = dac_log_l.size();
    adc_at_start = adc_log_l.size();
    check(!irq, "irq before calibration");
    wr(REG_CTRL, 32'h1);
    n_sweep++;
    wait_state(SEQ_DONE, (sweep_len + N_TB) * 5 + 2000);   // a frame is about 4 polls
    check(irq, "irq not raised at fft_done");
    rd(REG_STATUS, d);
    check(d[ST_FFT_DONE] && d[ST_SWEEP_DONE] && !d[ST_CAPTURE_OVF], $sformatf("STATUS after calibration %h", d));
    if (d[ST_FFT_DONE]) n_fft++;
    check(u_core.packets_in == 1 && u_core.packets_out == 1 && u_core.framing_errors == 0,
          "FFT core did not see exactly one well-formed packet");
    #(100us);                             // the last sweep frame may still be on the I2S line
    // DAC carried exactly sweep_len sweep frames (L == R): the span from the
    // first to the last non-zero such frame; the sine itself may touch zero
    begin
      int j0, j1;
      j0 = -1; j1 = -1;
      for (int j = dac_at_start; j < dac_log_l.size(); j++)
        if (dac_log_l[j] == dac_log_r[j] && dac_log_l[j] != 0) begin
          if (j0 < 0) j0 = j;
          j1 = j;
        end
      check(j0 >= 0 && j1 - j0 + 1 == sweep_len, $sformatf("sweep frames on DAC %0d expected %0d", j1 - j0 + 1, sweep_len));
      if (j0 >= 0 && j1 - j0 + 1 != sweep_len)
        for (int j = j0; j <= j1; j++)
          if (dac_log_l[j] != dac_log_r[j] || dac_log_l[j] == 0)
            $display("  frame %0d (sweep sample %0d): dac %0d,%0d", j, j - j0, dac_log_l[j], dac_log_r[j]);
    end
    // the packet is N consecutive mic samples from the start of the sweep
    start_idx = -1;
    for (int s = adc_at_start - 4; s < adc_at_start + 20 && start_idx < 0; s++) begin
      bit ok;
      ok = 1;
      for (int i = 0; i < N_TB; i++) if (int'(u_core.in_samples[i]) != adc_log_l[s + i]) ok = 0;
      if (ok) start_idx = s;
    end
    check(start_idx >= 0, "FFT input is not N consecutive mic samples");
    if (start_idx < 0)
      for (int i = 0; i < N_TB; i++)
        if (int'(u_core.in_samples[i]) != adc_log_l[adc_at_start - 1 + i])
          $display("core in[%0d] %0d adc %0d size %0d", i, u_core.in_samples[i], adc_log_l[adc_at_start - 1 + i], adc_log_l.size());
    // read all bins back through the register window
    rd(REG_FFT_EXPONENT, d);
    check(d[5:0] == 6'(u_core.exponent), "FFT_EXPONENT");
    wr(REG_FFT_ADDR, 0);
    for (int k = 0; k <= N_TB / 2; k++) begin
      int re, im;
      rd(REG_FFT_DATA_RE, d); re = int'(signed'(d));
      rd(REG_FFT_DATA_IM, d); im = int'(signed'(d));
      check(re == int'(u_core.scaled(u_core.re_ref[k])) && im == int'(u_core.scaled(u_core.im_ref[k])),
            $sformatf("bin %0d: %0d,%0d", k, re, im));
    end
    n_bin_read++;
    rd(REG_FFT_ADDR, d); check(d == 0, "FFT_ADDR wrapped after the last bin");
    wr(REG_CTRL, 32'h4);
    n_soft_reset++;
    repeat (4) @(negedge clk);
    check(!irq, "irq still high after soft reset");

    // ---- 3: FIR ----
    for (int k = 0; k < 128; k++) begin hl[k] = 0; hr[k] = 0; end
    hl[0] = 4194304; hl[3] = -2097152; hl[127] = 1048576;   // 0.5, -0.25, 0.125
    hr[1] = 6291456; hr[2] = 1234567;
    wr(REG_COEF_ADDR, 0);
    for (int i = 0; i < 256; i++) wr(REG_COEF_DATA, 32'(i < 128 ? hl[i] : hr[i - 128]));
    rd(REG_COEF_ADDR, d); check(d == 0, "COEF_ADDR after 256 writes");
    n_coef++;
    adc_mode = 1;
    wr(REG_CTRL, 32'h2);
    rd(REG_STATUS, d); check(d[ST_FIR_READY], "fir_ready");
    #(300 * 20.83us);
    match_stream(dac_log_l.size() - 160, adc_log_l.size() - 160, 140, 1, matched);
    if (matched == 140) n_fir++;

    // ---- 4: bypass ----
    wr(REG_CTRL, 32'ha);
    #(60 * 20.83us);
    match_stream(dac_log_l.size() - 40, adc_log_l.size() - 40, 30, 0, matched);
    if (matched == 30) n_bypass++;

    check(n_sweep >= 1 && n_overflow >= 1 && n_error_state >= 1 && n_soft_reset >= 1 &&
          n_cap_read >= 1 && n_fft >= 1 && n_bin_read >= 1 && n_coef >= 1 && n_fir >= 1 &&
          n_bypass >= 1 && n_irq >= 1, "a mechanism never ran");
    $display("mechanisms: sweep=%0d overflow=%0d error=%0d soft_reset=%0d capture_read=%0d fft=%0d bin_read=%0d coef_load=%0d fir=%0d bypass=%0d irq_cycles=%0d",
             n_sweep, n_overflow, n_error_state, n_soft_reset, n_cap_read, n_fft, n_bin_read, n_coef, n_fir, n_bypass, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TIMEOUT_US * 1us);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
