// tb_avalon_csr -- exercises the register window through Avalon-MM reads and
// writes: fixed read latency of 2, CTRL pulses and levels, STATUS and irq
// masking, SWEEP_LEN reset value, capture readout with FIFO pop and
// CAPTURE_ADDR auto-increment, FFT readout (RE, IM with FFT_ADDR
// auto-increment, back-to-back reads, exponent) from a real fft_result_ram,
// 256 COEF_DATA writes with COEF_ADDR auto-increment and wrap, and the
// identification registers.
module tb_avalon_csr;
  import room_eq_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0] avs_address = '0;
  logic avs_read = 0, avs_write = 0, avs_readdatavalid, irq;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic start_sweep, soft_reset, fir_enable, bypass, cap_pop, cap_empty, coef_we;
  logic [31:0] sweep_len;
  logic st_sweep_done = 0, st_overflow = 0, st_fft_done = 0, st_fir_ready = 0, st_busy = 0;
  seq_state_t st_state = SEQ_IDLE;
  logic [23:0] cap_data;
  logic [12:0] fft_raddr;
  bin_t fft_rdata;
  logic [5:0] fft_exp;
  logic [7:0] coef_waddr;
  logic signed [23:0] coef_wdata;
  int checks = 0, failures = 0, start_pulses = 0, reset_pulses = 0, coef_writes = 0;
  logic [23:0] coef_seen [256];

  // result RAM and capture FIFO behind the CSR
  logic ram_we = 0, exp_we = 0, fifo_wr = 0;
  logic [12:0] ram_waddr = '0;
  bin_t ram_wdata = '0;
  logic [5:0] exp_in = '0;
  logic [23:0] fifo_d = '0;
  logic fifo_full;

  always #10 clk = ~clk;

  avalon_csr dut (.clk, .rst, .avs_address, .avs_read, .avs_write, .avs_writedata, .avs_readdata,
    .avs_readdatavalid, .irq, .start_sweep, .soft_reset, .fir_enable, .bypass, .sweep_len,
    .st_sweep_done, .st_overflow, .st_fft_done, .st_fir_ready, .st_busy, .st_state,
    .cap_pop, .cap_data, .cap_empty, .fft_raddr, .fft_rdata, .fft_exp,
    .coef_we, .coef_waddr, .coef_wdata);
  fft_result_ram u_ram (.clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata), .exp_we,
    .exp_in, .raddr(fft_raddr), .rdata(fft_rdata), .exp_out(fft_exp));
  dcfifo_model #(.DEPTH(16)) u_fifo (.aclr(rst), .wrclk(clk), .wrreq(fifo_wr), .data(fifo_d),
    .wrfull(fifo_full), .rdclk(clk), .rdreq(cap_pop), .q(cap_data), .rdempty(cap_empty));

  always @(posedge clk) if (!rst) begin
    if (start_sweep) start_pulses++;
    if (soft_reset) reset_pulses++;
    if (coef_we) begin coef_seen[coef_waddr] = coef_wdata; coef_writes++; end
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic wr(reg_addr_t a, logic [31:0] d);
    @(negedge clk); avs_address = a; avs_writedata = d; avs_write = 1;
    @(negedge clk); avs_write = 0;
  endtask

  task automatic rd(reg_addr_t a, output logic [31:0] d);
    int lat = 0;
    @(negedge clk); avs_address = a; avs_read = 1;
    @(negedge clk); avs_read = 0;
    lat = 1;
    while (!avs_readdatavalid) begin @(negedge clk); lat++; end
    check(lat == 2, $sformatf("read latency %0d", lat));
    d = avs_readdata;
  endtask

  bin_t bv [8];

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst = 0;
    rd(REG_SWEEP_LEN, d); check(d == 240000, "SWEEP_LEN reset value");
    rd(REG_VERSION, d); check(d == VERSION_ID, "VERSION");
    rd(REG_SAMPLE_RATE, d); check(d == 48000, "SAMPLE_RATE");
    rd(REG_TAP_COUNT, d); check(d == 128, "TAP_COUNT");
    wr(REG_SCRATCH, 32'hdead_beef); rd(REG_SCRATCH, d); check(d == 32'hdead_beef, "SCRATCH");
    wr(REG_SWEEP_LEN, 32'd4096); check(sweep_len == 4096, "SWEEP_LEN write");
    // CTRL
    wr(REG_CTRL, 32'h1); @(negedge clk);
    check(start_pulses == 1 && !fir_enable, "start pulse");
    wr(REG_CTRL, 32'ha);                                  // fir_enable + bypass
    check(fir_enable && bypass && start_pulses == 1, "fir_enable/bypass levels");
    rd(REG_CTRL, d); check(d == 32'ha, "CTRL readback (pulse bits read 0)");
    wr(REG_CTRL, 32'h6); @(negedge clk);
    check(reset_pulses == 1 && fir_enable && !bypass, "soft reset pulse");
    // STATUS and irq
    st_fft_done = 1; st_busy = 1; st_state = SEQ_DONE;
    rd(REG_STATUS, d); check(d == 32'h414, $sformatf("STATUS %h", d));
    check(!irq, "irq while masked");
    wr(REG_IRQ_MASK, 32'h4); @(negedge clk);
    check(irq, "irq not raised");
    wr(REG_IRQ_MASK, 32'h3); @(negedge clk);
    check(!irq, "irq with other bits masked");
    rd(REG_IRQ_MASK, d); check(d == 3, "IRQ_MASK readback");
    // capture readout
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); fifo_wr = 1; fifo_d = 24'h800000 + 24'(i * 3);
    end
    @(negedge clk); fifo_wr = 0;
    wr(REG_CAPTURE_ADDR, 32'd100);
    for (int i = 0; i < 5; i++) begin
      rd(REG_CAPTURE_DATA, d);
      check(d == 32'(signed'(24'h800000 + 24'(i * 3))), $sformatf("capture word %0d = %h", i, d));
    end
    rd(REG_CAPTURE_DATA, d); check(d == 0, "empty capture read");
    rd(REG_CAPTURE_ADDR, d); check(d == 105, $sformatf("CAPTURE_ADDR %0d", d));
    // FFT readout
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); ram_we = 1; ram_waddr = 13'(i < 4 ? 10 + i : 4093 + i - 4);
      bv[i] = bin_t'({$urandom, $urandom}); ram_wdata = bv[i];
    end
    @(negedge clk); ram_we = 0; exp_we = 1; exp_in = 6'h3d; @(negedge clk); exp_we = 0;
    // bins 0..3 at addresses 10..13, bins 4..7 at 4093..4096
    wr(REG_FFT_ADDR, 32'd10);
    for (int i = 0; i < 4; i++) begin
      rd(REG_FFT_DATA_RE, d); check(d == 32'(signed'(bv[i].re)), $sformatf("RE %0d", i));
      rd(REG_FFT_DATA_IM, d); check(d == 32'(signed'(bv[i].im)), $sformatf("IM %0d", i));
    end
    rd(REG_FFT_ADDR, d); check(d == 14, "FFT_ADDR auto-increment");
    rd(REG_FFT_EXPONENT, d); check(d == 32'hffff_fffd, "FFT_EXPONENT sign-extended");
    // back-to-back IM, RE, IM reads in consecutive cycles
    wr(REG_FFT_ADDR, 32'd4093);
    @(negedge clk); avs_read = 1; avs_address = REG_FFT_DATA_IM;
    @(negedge clk); avs_address = REG_FFT_DATA_RE;
    @(negedge clk); avs_address = REG_FFT_DATA_IM;
    check(avs_readdatavalid && avs_readdata == 32'(signed'(bv[4].im)), "b2b IM 0");
    @(negedge clk); avs_read = 0;
    check(avs_readdatavalid && avs_readdata == 32'(signed'(bv[5].re)), "b2b RE 1");
    @(negedge clk);
    check(avs_readdatavalid && avs_readdata == 32'(signed'(bv[5].im)), "b2b IM 1");
    wr(REG_FFT_ADDR, 32'd4096);
    rd(REG_FFT_DATA_IM, d); rd(REG_FFT_ADDR, d); check(d == 0, "FFT_ADDR wraps after 4096");
    // coefficients
    wr(REG_COEF_ADDR, 32'd0);
    for (int i = 0; i < 256; i++) wr(REG_COEF_DATA, 32'(i * 7 + 1));
    @(negedge clk);
    check(coef_writes == 256, $sformatf("coef writes %0d", coef_writes));
    for (int i = 0; i < 256; i++) check(coef_seen[i] == 24'(i * 7 + 1), $sformatf("coef %0d", i));
    rd(REG_COEF_ADDR, d); check(d == 0, "COEF_ADDR wraps after 256");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
