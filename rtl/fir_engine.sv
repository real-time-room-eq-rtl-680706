// fir_engine -- stereo 128-tap real-time FIR, y[n] = sum_k h[k] * x[n-k].
//
// As in the document: Q1.23 taps from coef_ram, past samples in a circular
// delay line indexed mod TAPS, and one pipelined multiply-accumulate per
// channel on the 50 MHz system clock, so a stereo sample takes TAPS cycles
// of MAC work (the two channels run side by side).
//
// Operation: after reset the engine first clears its delay line (TAPS
// cycles). Then each `in_valid` pulse writes {in_l, in_r} at the write
// pointer and starts a pass over k = 0..TAPS-1 that reads x[n-k] at
// (wptr - k) mod TAPS and h[k] at k. Pipeline: address -> RAM read ->
// registered 24x24 product -> 56-bit accumulator. The sum is rounded
// (add 2^22, shift right 23) and saturated back to Q1.23. `out_valid` pulses
// TAPS+3 cycles after `in_valid`; a new input is accepted only while the
// engine is idle and its pipeline empty (`in_ready`), which at 48 kHz (about 1040 cycles per frame)
// always holds. Modes (this design's reading of CTRL.fir_enable and
// CTRL.bypass): bypass passes the input to the output one cycle later,
// otherwise with `enable` low the output is silence. `ready` (STATUS.
// fir_ready) means enabled and initialised. Coefficient writes from the HPS
// go straight to coef_ram and take effect on the next sample.
module fir_engine
  import room_eq_pkg::*;
#(
  parameter int unsigned TAPS = 128,
  parameter int unsigned W    = 24
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      enable,
  input  logic                      bypass,
  output logic                      ready,
  // coefficient write port (from the register interface)
  input  logic                      coef_we,
  input  logic [$clog2(2*TAPS)-1:0] coef_waddr,
  input  logic signed [W-1:0]       coef_wdata,
  // sample stream
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic signed [W-1:0]       in_l,
  input  logic signed [W-1:0]       in_r,
  output logic                      out_valid,
  output logic signed [W-1:0]       out_l,
  output logic signed [W-1:0]       out_r
);
  localparam int unsigned AW  = $clog2(TAPS);
  localparam int unsigned PW  = 2 * W;
  localparam int unsigned ACW = PW + AW + 1;

  typedef enum logic [1:0] {F_INIT, F_IDLE, F_MAC} fstate_t;
  fstate_t st;

  logic [AW-1:0]  wptr, k, init_addr;
  logic           issue, rd_v, mul_v, last_issue, rd_last, mul_last;
  logic signed [W-1:0]   h_l, h_r;
  stereo_t               x_rd;
  logic signed [PW-1:0]  p_l, p_r;
  logic signed [ACW-1:0] acc_l, acc_r;
  logic                  dl_we;
  logic [AW-1:0]         dl_waddr;
  stereo_t               dl_wdata;

  assign in_ready = (st == F_IDLE) && !rd_v && !mul_v;
  assign ready    = enable && (st != F_INIT);
  assign issue    = (st == F_MAC);
  assign last_issue = issue && (k == AW'(TAPS - 1));

  always_comb begin
    dl_we    = 1'b0;
    dl_waddr = wptr;
    dl_wdata = '{l: in_l, r: in_r};
    if (st == F_INIT) begin
      dl_we    = 1'b1;
      dl_waddr = init_addr;
      dl_wdata = '0;
    end else if (in_valid && in_ready) begin
      dl_we = 1'b1;
    end
  end

  coef_ram #(.TAPS(TAPS), .W(W)) u_coef (
    .clk     (clk),
    .we      (coef_we),
    .waddr   (coef_waddr),
    .wdata   (coef_wdata),
    .raddr   (k),
    .rdata_l (h_l),
    .rdata_r (h_r)
  );

  delay_line_ram #(.DEPTH(TAPS)) u_dline (
    .clk   (clk),
    .we    (dl_we),
    .waddr (dl_waddr),
    .wdata (dl_wdata),
    .raddr (wptr - k),
    .rdata (x_rd)
  );

  function automatic logic signed [W-1:0] round_sat(input logic signed [ACW-1:0] a);
    logic signed [ACW-1:0] r;
    r = (a + (ACW'(1) <<< (W - 2))) >>> (W - 1);
    if (r > ACW'((1 <<< (W - 1)) - 1))       return {1'b0, {(W-1){1'b1}}};
    else if (r < -ACW'(1 <<< (W - 1)))       return {1'b1, {(W-1){1'b0}}};
    else                                     return r[W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= F_INIT;
      init_addr <= '0;
      wptr      <= '0;
      k         <= '0;
      rd_v      <= 1'b0;
      rd_last   <= 1'b0;
      mul_v     <= 1'b0;
      mul_last  <= 1'b0;
      p_l       <= '0;
      p_r       <= '0;
      acc_l     <= '0;
      acc_r     <= '0;
      out_valid <= 1'b0;
      out_l     <= '0;
      out_r     <= '0;
    end else begin
      out_valid <= 1'b0;
      // pipeline stage 1: RAM read in flight
      rd_v    <= issue;
      rd_last <= last_issue;
      // stage 2: products
      mul_v    <= rd_v;
      mul_last <= rd_last;
      if (rd_v) begin
        p_l <= h_l * x_rd.l;
        p_r <= h_r * x_rd.r;
      end
      // stage 3: accumulate; result after the last product
      if (mul_v) begin
        acc_l <= acc_l + ACW'(p_l);
        acc_r <= acc_r + ACW'(p_r);
      end
      if (mul_v && mul_last) begin
        out_valid <= 1'b1;
        out_l     <= enable ? round_sat(acc_l + ACW'(p_l)) : '0;
        out_r     <= enable ? round_sat(acc_r + ACW'(p_r)) : '0;
        wptr      <= wptr + 1'b1;
      end

      case (st)
        F_INIT: begin
          init_addr <= init_addr + 1'b1;
          if (init_addr == AW'(TAPS - 1)) st <= F_IDLE;
        end
        F_IDLE: if (in_valid && in_ready) begin
          if (bypass) begin
            out_valid <= 1'b1;
            out_l     <= in_l;
            out_r     <= in_r;
            wptr      <= wptr + 1'b1;
          end else begin
            st    <= F_MAC;
            k     <= '0;
            acc_l <= '0;
            acc_r <= '0;
          end
        end
        F_MAC: begin
          k <= k + 1'b1;
          if (last_issue) st <= F_IDLE;
        end
        default: st <= F_INIT;
      endcase
    end
  end
endmodule
