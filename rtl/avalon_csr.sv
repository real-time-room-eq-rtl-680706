// avalon_csr -- the peripheral's 32-bit register window for the HPS.
//
// The document names this block avalon_csr and calls it the "32-bit register
// file, AXI slave"; the HPS reaches it over AXI. This design implements it as
// an Avalon-MM slave (the form a Platform Designer component takes; the
// interconnect bridges the HPS AXI master to it) with word addresses, fixed
// read latency 2 (`readdatavalid` marks the data) and no wait states.
//
// Registers (word offset; the document lists the registers and roles, the
// offsets and bit positions are this design's):
//   0 CTRL         R/W  [0] start_sweep (write 1 to pulse, reads 0)
//                       [1] fir_enable  [2] soft_reset (write 1 to pulse)
//                       [3] bypass
//   1 STATUS       R    [0] sweep_done [1] capture_overflow [2] fft_done
//                       [3] fir_ready [4] busy [10:8] sequencer state
//   2 IRQ_MASK     R/W  [3:0] enables for STATUS[3:0]; irq = |(STATUS & MASK)
//   3 SWEEP_LEN    R/W  sweep length in samples (reset 240000 = 5 s)
//   4 CAPTURE_ADDR R/W  index of the next captured sample to read
//   5 CAPTURE_DATA R    next captured sample (sign-extended); a read pops it
//                       from the capture FIFO and increments CAPTURE_ADDR
//   6 FFT_ADDR     R/W  bin index
//   7 FFT_DATA_RE  R    real part of bin FFT_ADDR (sign-extended)
//   8 FFT_DATA_IM  R    imaginary part; a read increments FFT_ADDR
//   9 FFT_EXPONENT R    block exponent of the frame (sign-extended)
//  10 COEF_ADDR    R/W  tap index 0..255 (left taps, then right taps)
//  11 COEF_DATA    W    writes the tap at COEF_ADDR and increments it
//  12 VERSION, 13 SAMPLE_RATE (48000), 14 TAP_COUNT (128): R; 15 SCRATCH: R/W
// The capture FIFO cannot be addressed at random, so CAPTURE_ADDR only counts
// the words read; reads work while the sequencer is not draining the FIFO
// into the FFT (for example after a capture overflow). Reading the FFT data
// uses the result RAM's one-cycle read: the RAM address is FFT_ADDR itself.
module avalon_csr
  import room_eq_pkg::*;
#(
  parameter int unsigned TAPS        = 128,
  parameter int unsigned N_BINS      = 4097,
  parameter int unsigned SAMPLE_RATE = 48000,
  parameter logic [31:0] SWEEP_LEN_RESET = 32'd240000
) (
  input  logic                        clk,
  input  logic                        rst,
  // Avalon-MM slave
  input  logic [CSR_AW-1:0]           avs_address,
  input  logic                        avs_read,
  input  logic                        avs_write,
  input  logic [CSR_W-1:0]            avs_writedata,
  output logic [CSR_W-1:0]            avs_readdata,
  output logic                        avs_readdatavalid,
  output logic                        irq,
  // control
  output logic                        start_sweep,
  output logic                        soft_reset,
  output logic                        fir_enable,
  output logic                        bypass,
  output logic [31:0]                 sweep_len,
  // status
  input  logic                        st_sweep_done,
  input  logic                        st_overflow,
  input  logic                        st_fft_done,
  input  logic                        st_fir_ready,
  input  logic                        st_busy,
  input  seq_state_t                  st_state,
  // capture readout
  output logic                        cap_pop,
  input  logic [SAMPLE_W-1:0]         cap_data,
  input  logic                        cap_empty,
  // FFT readout
  output logic [$clog2(N_BINS)-1:0]   fft_raddr,
  input  bin_t                        fft_rdata,
  input  logic [EXP_W-1:0]            fft_exp,
  // coefficient write-back
  output logic                        coef_we,
  output logic [$clog2(2*TAPS)-1:0]   coef_waddr,
  output logic signed [SAMPLE_W-1:0]  coef_wdata
);
  localparam int unsigned FAW = $clog2(N_BINS);
  localparam int unsigned CAW = $clog2(2 * TAPS);

  logic [3:0]        irq_mask;
  logic [31:0]       capture_addr, scratch;
  logic [FAW-1:0]    fft_addr;
  logic [CAW-1:0]    coef_addr;
  logic [CSR_W-1:0]  status;
  // read pipeline
  logic              rd_p;
  reg_addr_t         rd_addr_p;
  logic [SAMPLE_W-1:0] cap_q_p;
  logic              cap_ok_p;

  logic rd_hit_cap, rd_hit_fim, wr_hit;
  assign rd_hit_cap = avs_read && reg_addr_t'(avs_address) == REG_CAPTURE_DATA;
  assign rd_hit_fim = avs_read && reg_addr_t'(avs_address) == REG_FFT_DATA_IM;
  assign wr_hit     = avs_write;

  always_comb begin
    status = '0;
    status[ST_SWEEP_DONE] = st_sweep_done;
    status[ST_CAPTURE_OVF] = st_overflow;
    status[ST_FFT_DONE]   = st_fft_done;
    status[ST_FIR_READY]  = st_fir_ready;
    status[ST_BUSY]       = st_busy;
    status[ST_STATE_LSB +: 3] = st_state;
  end

  assign cap_pop    = rd_hit_cap && !cap_empty;
  assign fft_raddr  = fft_addr;
  assign coef_waddr = coef_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      start_sweep  <= 1'b0;
      soft_reset   <= 1'b0;
      fir_enable   <= 1'b0;
      bypass       <= 1'b0;
      sweep_len    <= SWEEP_LEN_RESET;
      irq_mask     <= '0;
      capture_addr <= '0;
      scratch      <= '0;
      fft_addr     <= '0;
      coef_addr    <= '0;
      coef_we      <= 1'b0;
      coef_wdata   <= '0;
      irq          <= 1'b0;
    end else begin
      start_sweep <= 1'b0;
      soft_reset  <= 1'b0;
      coef_we     <= 1'b0;
      irq         <= |(status[3:0] & irq_mask);
      if (wr_hit) begin
        unique case (reg_addr_t'(avs_address))
          REG_CTRL: begin
            start_sweep <= avs_writedata[CTRL_START_SWEEP];
            soft_reset  <= avs_writedata[CTRL_SOFT_RESET];
            fir_enable  <= avs_writedata[CTRL_FIR_ENABLE];
            bypass      <= avs_writedata[CTRL_BYPASS];
          end
          REG_IRQ_MASK:     irq_mask     <= avs_writedata[3:0];
          REG_SWEEP_LEN:    sweep_len    <= avs_writedata;
          REG_CAPTURE_ADDR: capture_addr <= avs_writedata;
          REG_FFT_ADDR:     fft_addr     <= FAW'(avs_writedata);
          REG_COEF_ADDR:    coef_addr    <= CAW'(avs_writedata);
          REG_COEF_DATA: begin
            coef_we    <= 1'b1;
            coef_wdata <= avs_writedata[SAMPLE_W-1:0];
          end
          REG_SCRATCH:      scratch      <= avs_writedata;
          default: ;
        endcase
      end
      // address side effects: auto-increment
      if (coef_we) coef_addr <= coef_addr + 1'b1;
      if (cap_pop) capture_addr <= capture_addr + 1'b1;
      if (rd_hit_fim) fft_addr <= (fft_addr == FAW'(N_BINS - 1)) ? '0 : fft_addr + 1'b1;
    end
  end

  // read pipeline: stage 1 registers the request and the FIFO head, stage 2
  // selects the data (the result RAM output is valid in stage 2)
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_p              <= 1'b0;
      rd_addr_p         <= REG_CTRL;
      cap_q_p           <= '0;
      cap_ok_p          <= 1'b0;
      avs_readdata      <= '0;
      avs_readdatavalid <= 1'b0;
    end else begin
      rd_p      <= avs_read;
      rd_addr_p <= reg_addr_t'(avs_address);
      cap_q_p   <= cap_data;
      cap_ok_p  <= !cap_empty;
      avs_readdatavalid <= rd_p;
      if (rd_p) begin
        unique case (rd_addr_p)
          REG_CTRL:         avs_readdata <= {28'd0, bypass, 1'b0, fir_enable, 1'b0};
          REG_STATUS:       avs_readdata <= status;
          REG_IRQ_MASK:     avs_readdata <= {28'd0, irq_mask};
          REG_SWEEP_LEN:    avs_readdata <= sweep_len;
          REG_CAPTURE_ADDR: avs_readdata <= capture_addr;
          REG_CAPTURE_DATA: avs_readdata <= cap_ok_p ? 32'(signed'(cap_q_p)) : '0;
          REG_FFT_ADDR:     avs_readdata <= 32'(fft_addr);
          REG_FFT_DATA_RE:  avs_readdata <= 32'(signed'(fft_rdata.re));
          REG_FFT_DATA_IM:  avs_readdata <= 32'(signed'(fft_rdata.im));
          REG_FFT_EXPONENT: avs_readdata <= 32'(signed'(fft_exp));
          REG_COEF_ADDR:    avs_readdata <= 32'(coef_addr);
          REG_COEF_DATA:    avs_readdata <= '0;
          REG_VERSION:      avs_readdata <= VERSION_ID;
          REG_SAMPLE_RATE:  avs_readdata <= 32'(SAMPLE_RATE);
          REG_TAP_COUNT:    avs_readdata <= 32'(TAPS);
          REG_SCRATCH:      avs_readdata <= scratch;
          default:          avs_readdata <= '0;
        endcase
      end
    end
  end
endmodule
