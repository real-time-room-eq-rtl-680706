// room_eq_peripheral -- closed-loop room equalizer peripheral (top level).
//
// One peripheral measures a room and then corrects audio in real time. Three
// data paths share it, as in the document:
//   sweep-out    CSR start -> calibration_sequencer -> sweep_generator -> i2s_tx
//   calibration  i2s_rx -> capture_writer -> capture FIFO -> capture_reader
//                -> fft_engine (+ FFT core) -> fft_result_ram -> CSR reads
//   real-time    i2s_rx -> fir_engine (coef_ram, delay_line_ram) -> i2s_tx
// The HPS drives everything through avalon_csr: it starts a sweep, polls
// STATUS.fft_done, reads the 4097 bins and the block exponent, designs the
// correction filter in software, writes 256 taps and sets CTRL.fir_enable.
//
// Clock domains: `clk` is the 50 MHz system clock (CSR, sequencer, FFT
// wrapper, FIR); `xck` is the 12.288 MHz codec master clock from the PLL,
// from which i2s_clock_div derives BCLK (3.072 MHz) and LRCK (48 kHz); the
// I2S transmitter and receiver, the sweep generator and the capture writer run
// on it. Crossings: capture samples through the external dual-clock FIFO,
// single-bit levels through cdc_sync, and the stereo word of each frame
// through sample_cdc (toggle handshake). `reset` is synchronous, active high,
// in the `clk` domain; a synchronized copy resets the XCK domain.
// CTRL.soft_reset returns the sequencer to IDLE and clears the calibration
// path (FFT wrapper, capture reader, FIFO via `capfifo_aclr`); the FIR path
// keeps running.
//
// Vendor parts are outside this RTL and connect through ports: the PLL (its
// output is the `xck` input), the Altera dcfifo (capfifo_*: write side on
// XCK, read side on clk, show-ahead) and the Altera FFT core (fft_sink_* /
// fft_source_*, AvalonST, block floating point, natural output order; reset
// by `fft_core_reset`, high with `reset` or a soft reset). The
// codec pins are aud_*; ADC and DAC share LRCK.
module room_eq_peripheral
  import room_eq_pkg::*;
#(
  parameter int unsigned N_FFT       = 8192,
  parameter int unsigned TAPS        = 128,
  parameter int unsigned SWEEP_N     = 240000,  // default sweep length, 5 s
  parameter int unsigned FS          = 48000,
  parameter int unsigned F0          = 20,
  parameter int unsigned F1          = 20000,
  parameter int unsigned BCLK_DIV    = 4,       // XCK / BCLK
  parameter int unsigned BCLK_PER_LR = 64       // BCLK / LRCK
) (
  input  logic                  clk,
  input  logic                  reset,
  // Avalon-MM register window (bridged from the HPS AXI)
  input  logic [CSR_AW-1:0]     avs_address,
  input  logic                  avs_read,
  input  logic                  avs_write,
  input  logic [CSR_W-1:0]      avs_writedata,
  output logic [CSR_W-1:0]      avs_readdata,
  output logic                  avs_readdatavalid,
  output logic                  irq,
  // codec
  input  logic                  xck,
  output logic                  aud_xck,
  output logic                  aud_bclk,
  output logic                  aud_daclrck,
  output logic                  aud_adclrck,
  output logic                  aud_dacdat,
  input  logic                  aud_adcdat,
  // capture dcfifo (vendor IP)
  output logic                  capfifo_aclr,
  output logic                  capfifo_wrreq,
  output logic [SAMPLE_W-1:0]   capfifo_data,
  input  logic                  capfifo_wrfull,
  output logic                  capfifo_rdreq,
  input  logic [SAMPLE_W-1:0]   capfifo_q,
  input  logic                  capfifo_rdempty,
  // FFT core (vendor IP)
  output logic                  fft_core_reset,
  output logic                  fft_sink_valid,
  input  logic                  fft_sink_ready,
  output logic                  fft_sink_sop,
  output logic                  fft_sink_eop,
  output logic [SAMPLE_W-1:0]   fft_sink_real,
  output logic [SAMPLE_W-1:0]   fft_sink_imag,
  output logic                  fft_inverse,
  input  logic                  fft_source_valid,
  output logic                  fft_source_ready,
  input  logic                  fft_source_sop,
  input  logic                  fft_source_eop,
  input  logic [SAMPLE_W-1:0]   fft_source_real,
  input  logic [SAMPLE_W-1:0]   fft_source_imag,
  input  logic [EXP_W-1:0]      fft_source_exp
);
  localparam int unsigned N_BINS = N_FFT / 2 + 1;
  localparam int unsigned BAW    = $clog2(N_BINS);

  // ---------------- system clock domain ----------------
  logic        start_sweep, soft_reset, fir_enable, bypass;
  logic [31:0] sweep_len;
  logic        cal_rst;
  seq_state_t  seq_state;
  logic        sweep_req, capture_en, drain, fft_start, seq_busy;
  logic        flag_sweep_done, flag_overflow, flag_fft_done;
  logic        sweep_done_s, overflow_s, streamed, fft_complete;
  logic        cap_pop, cap_empty;
  logic [SAMPLE_W-1:0] cap_data;
  logic        st_valid, st_ready, st_sop, st_eop;
  logic [SAMPLE_W-1:0] st_data;
  logic        ram_we, exp_we;
  logic [BAW-1:0] ram_waddr, ram_raddr;
  bin_t        ram_wdata, ram_rdata;
  logic [EXP_W-1:0] exp_wdata, exp_rdata;
  logic        coef_we;
  logic [$clog2(2*TAPS)-1:0] coef_waddr;
  logic signed [SAMPLE_W-1:0] coef_wdata;
  logic        fir_ready, fir_in_valid, fir_out_valid;
  stereo_t     fir_in, fir_out;

  assign cal_rst      = reset || soft_reset;
  assign capfifo_aclr   = cal_rst;
  assign fft_core_reset = cal_rst;

  avalon_csr #(.TAPS(TAPS), .N_BINS(N_BINS), .SAMPLE_RATE(FS),
               .SWEEP_LEN_RESET(32'(SWEEP_N))) u_csr (
    .clk (clk), .rst (reset),
    .avs_address, .avs_read, .avs_write, .avs_writedata,
    .avs_readdata, .avs_readdatavalid, .irq,
    .start_sweep, .soft_reset, .fir_enable, .bypass, .sweep_len,
    .st_sweep_done (flag_sweep_done), .st_overflow (flag_overflow),
    .st_fft_done (flag_fft_done), .st_fir_ready (fir_ready),
    .st_busy (seq_busy), .st_state (seq_state),
    .cap_pop, .cap_data, .cap_empty,
    .fft_raddr (ram_raddr), .fft_rdata (ram_rdata), .fft_exp (exp_rdata),
    .coef_we, .coef_waddr, .coef_wdata
  );

  calibration_sequencer u_seq (
    .clk (clk), .rst (reset),
    .start_sweep, .soft_reset,
    .sweep_done (sweep_done_s), .streamed, .overflow (overflow_s), .fft_complete,
    .state (seq_state), .sweep_req, .capture_en, .drain, .fft_start,
    .busy (seq_busy), .flag_sweep_done, .flag_overflow, .flag_fft_done
  );

  capture_reader #(.N(N_FFT), .W(SAMPLE_W)) u_cap_rd (
    .clk (clk), .rst (cal_rst),
    .fifo_rdempty (capfifo_rdempty), .fifo_q (capfifo_q), .fifo_rdreq (capfifo_rdreq),
    .drain, .streamed,
    .st_valid, .st_ready, .st_sop, .st_eop, .st_data,
    .csr_pop (cap_pop), .csr_data (cap_data), .csr_empty (cap_empty)
  );

  fft_engine #(.N(N_FFT), .W(SAMPLE_W)) u_fft (
    .clk (clk), .rst (cal_rst),
    .start (fft_start), .done (fft_complete), .busy (),
    .in_valid (st_valid), .in_ready (st_ready), .in_sop (st_sop), .in_eop (st_eop),
    .in_data (st_data),
    .snk_valid (fft_sink_valid), .snk_ready (fft_sink_ready),
    .snk_sop (fft_sink_sop), .snk_eop (fft_sink_eop),
    .snk_real (fft_sink_real), .snk_imag (fft_sink_imag), .snk_inverse (fft_inverse),
    .src_valid (fft_source_valid), .src_ready (fft_source_ready),
    .src_sop (fft_source_sop), .src_eop (fft_source_eop),
    .src_real (fft_source_real), .src_imag (fft_source_imag), .src_exp (fft_source_exp),
    .ram_we, .ram_addr (ram_waddr), .ram_data (ram_wdata),
    .exp_we, .exp_data (exp_wdata)
  );

  fft_result_ram #(.N(N_FFT)) u_fft_ram (
    .clk (clk),
    .we (ram_we), .waddr (ram_waddr), .wdata (ram_wdata),
    .exp_we, .exp_in (exp_wdata),
    .raddr (ram_raddr), .rdata (ram_rdata), .exp_out (exp_rdata)
  );

  fir_engine #(.TAPS(TAPS), .W(SAMPLE_W)) u_fir (
    .clk (clk), .rst (reset),
    .enable (fir_enable), .bypass, .ready (fir_ready),
    .coef_we, .coef_waddr, .coef_wdata,
    .in_valid (fir_in_valid), .in_ready (),
    .in_l (fir_in.l), .in_r (fir_in.r),
    .out_valid (fir_out_valid), .out_l (fir_out.l), .out_r (fir_out.r)
  );

  // ---------------- XCK domain ----------------
  logic        xrst;
  logic        bclk, lrck, bclk_rise, bclk_fall, lr_toggle;
  logic        sweep_req_x, sweep_req_x_d, capture_en_x, sweep_done_x, overflow_x;
  logic        sweep_valid, sweep_ready, sweep_busy;
  sample_t     sweep_sample;
  stereo_t     rx_word, fir_x;
  logic        rx_valid, tx_ready, tx_valid;
  stereo_t     tx_word;

  cdc_sync #(.STAGES(2), .RESET_VAL(1'b1)) u_sync_rst (
    .clk (xck), .rst (1'b0), .d (reset), .q (xrst));
  cdc_sync u_sync_req (.clk (xck), .rst (xrst), .d (sweep_req),  .q (sweep_req_x));
  cdc_sync u_sync_cap (.clk (xck), .rst (xrst), .d (capture_en), .q (capture_en_x));
  cdc_sync u_sync_swd (.clk (clk), .rst (reset), .d (sweep_done_x), .q (sweep_done_s));
  cdc_sync u_sync_ovf (.clk (clk), .rst (reset), .d (overflow_x),   .q (overflow_s));

  i2s_clock_div #(.BCLK_DIV(BCLK_DIV), .BCLK_PER_LR(BCLK_PER_LR)) u_clkdiv (
    .xck (xck), .rst (xrst),
    .bclk, .lrck, .bclk_rise, .bclk_fall, .lr_toggle
  );

  i2s_rx #(.W(SAMPLE_W)) u_rx (
    .clk (xck), .rst (xrst), .lrck, .bclk_rise, .bclk_fall, .lr_toggle,
    .adcdat (aud_adcdat), .out_l (rx_word.l), .out_r (rx_word.r), .out_valid (rx_valid)
  );

  always_ff @(posedge xck) begin
    if (xrst) sweep_req_x_d <= 1'b0;
    else      sweep_req_x_d <= sweep_req_x;
  end

  sweep_generator #(.FS(FS), .F0(F0), .F1(F1), .SWEEP_N(SWEEP_N)) u_sweep (
    .clk (xck), .rst (xrst),
    .start (sweep_req_x && !sweep_req_x_d), .clear (!sweep_req_x),
    .sweep_len,   // quasi-static: written by the HPS before the start
    .sample (sweep_sample), .sample_valid (sweep_valid), .sample_ready (sweep_ready),
    .busy (sweep_busy), .done (sweep_done_x)
  );

  capture_writer #(.WINDOW(N_FFT), .W(SAMPLE_W)) u_cap_wr (
    .clk (xck), .rst (xrst), .capture_en (capture_en_x),
    .sample (rx_word.l), .sample_valid (rx_valid),
    .fifo_wrfull (capfifo_wrfull), .fifo_wrreq (capfifo_wrreq), .fifo_data (capfifo_data),
    .overflow (overflow_x), .window_done ()
  );

  // frame words between the domains
  sample_cdc #(.W(2*SAMPLE_W)) u_cdc_in (
    .src_clk (xck), .src_rst (xrst), .src_valid (rx_valid), .src_data (rx_word),
    .dst_clk (clk), .dst_rst (reset), .dst_valid (fir_in_valid), .dst_data (fir_in)
  );
  sample_cdc #(.W(2*SAMPLE_W)) u_cdc_out (
    .src_clk (clk), .src_rst (reset), .src_valid (fir_out_valid), .src_data (fir_out),
    .dst_clk (xck), .dst_rst (xrst), .dst_valid (), .dst_data (fir_x)
  );

  // transmit source: the sweep on both channels while it runs, else the FIR path
  always_comb begin
    if (sweep_busy) begin
      tx_word  = '{l: sweep_sample, r: sweep_sample};
      tx_valid = sweep_valid;
    end else begin
      tx_word  = fir_x;
      tx_valid = 1'b1;
    end
  end
  assign sweep_ready = tx_ready && sweep_busy;

  i2s_tx #(.W(SAMPLE_W)) u_tx (
    .clk (xck), .rst (xrst), .lrck, .bclk_fall, .lr_toggle,
    .in_l (tx_word.l), .in_r (tx_word.r), .in_valid (tx_valid), .in_ready (tx_ready),
    .dacdat (aud_dacdat)
  );

  assign aud_xck     = xck;
  assign aud_bclk    = bclk;
  assign aud_daclrck = lrck;
  assign aud_adclrck = lrck;
endmodule
