// fft_engine -- wrapper around the vendor FFT core (Altera FFT IP) of the
// calibration path.
//
// The transform itself is done by the FFT IP core, which sits outside this
// RTL; this wrapper is the document's in-house part around it. `start` (a
// pulse from the sequencer) arms it; it then forwards exactly one AvalonST
// packet of N real samples from the capture FIFO reader to the core (imag
// input tied to zero, forward transform), closing its input after the `eop`
// beat. It accepts the core's N output bins in natural order (the document
// leaves the order to IP generation; natural order is this design's choice),
// writes bins 0..N/2 (the half spectrum of a real signal, 4097 bins by
// default) to fft_result_ram, loads the block exponent from the `sop` beat,
// and pulses `done` ("FFT complete") after the core's `eop`. The wrapper
// always accepts output (`src_ready` high while waiting for results).
// The exponent is stored as the core reports it; the HPS multiplies the bins
// by 2^exponent, as in the document's filter-design steps.
module fft_engine
  import room_eq_pkg::*;
#(
  parameter int unsigned N = 8192,
  parameter int unsigned W = 24
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  output logic                     done,
  output logic                     busy,
  // AvalonST sink from the capture FIFO reader
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic                     in_sop,
  input  logic                     in_eop,
  input  logic [W-1:0]             in_data,
  // to the FFT core's sink
  output logic                     snk_valid,
  input  logic                     snk_ready,
  output logic                     snk_sop,
  output logic                     snk_eop,
  output logic [W-1:0]             snk_real,
  output logic [W-1:0]             snk_imag,
  output logic                     snk_inverse,
  // from the FFT core's source
  input  logic                     src_valid,
  output logic                     src_ready,
  input  logic                     src_sop,
  input  logic                     src_eop,
  input  logic [W-1:0]             src_real,
  input  logic [W-1:0]             src_imag,
  input  logic [EXP_W-1:0]         src_exp,
  // to fft_result_ram
  output logic                     ram_we,
  output logic [$clog2(N/2+1)-1:0] ram_addr,
  output bin_t                     ram_data,
  output logic                     exp_we,
  output logic [EXP_W-1:0]         exp_data
);
  localparam int unsigned CW = $clog2(N);
  localparam int unsigned AW = $clog2(N/2 + 1);

  typedef enum logic [1:0] {E_IDLE, E_LOAD, E_RESULT} estate_t;
  estate_t       st;
  logic [CW-1:0] in_cnt;
  logic [CW-1:0] out_cnt;
  logic          out_take, in_take;

  // input side: pass the packet through while loading
  assign snk_valid   = (st == E_LOAD) && in_valid;
  assign in_ready    = (st == E_LOAD) && snk_ready;
  assign snk_sop     = in_sop;
  assign snk_eop     = in_eop;
  assign snk_real    = in_data;
  assign snk_imag    = '0;
  assign snk_inverse = 1'b0;
  assign in_take     = snk_valid && snk_ready;

  // output side: collect bins
  assign src_ready = (st != E_IDLE);
  assign out_take  = src_valid && src_ready;

  logic [CW-1:0] bin_idx;
  assign bin_idx = src_sop ? '0 : out_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= E_IDLE;
      in_cnt   <= '0;
      out_cnt  <= '0;
      done     <= 1'b0;
      ram_we   <= 1'b0;
      ram_addr <= '0;
      ram_data <= '0;
      exp_we   <= 1'b0;
      exp_data <= '0;
    end else begin
      done   <= 1'b0;
      ram_we <= 1'b0;
      exp_we <= 1'b0;
      case (st)
        E_IDLE: if (start) begin
          st      <= E_LOAD;
          in_cnt  <= '0;
          out_cnt <= '0;
        end
        default: ;
      endcase
      if (st == E_LOAD && in_take) begin
        in_cnt <= in_cnt + 1'b1;
        if (in_eop) st <= E_RESULT;
      end
      if (out_take && st != E_IDLE) begin
        out_cnt <= bin_idx + 1'b1;
        if ({1'b0, bin_idx} <= (CW+1)'(N/2)) begin
          ram_we   <= 1'b1;
          ram_addr <= AW'(bin_idx);
          ram_data <= '{re: src_real, im: src_imag};
        end
        if (src_sop) begin
          exp_we   <= 1'b1;
          exp_data <= src_exp;
        end
        if (src_eop && st == E_RESULT) begin
          st   <= E_IDLE;
          done <= 1'b1;
        end
      end
    end
  end

  assign busy = (st != E_IDLE);

  // packet framing rules of the AvalonST input
  property p_sop_first;
    @(posedge clk) disable iff (rst) (st == E_LOAD && in_take && in_cnt == '0) |-> in_sop;
  endproperty
  property p_eop_last;
    @(posedge clk) disable iff (rst) (st == E_LOAD && in_take) |-> (in_eop == (in_cnt == CW'(N - 1)));
  endproperty
  a_sop_first: assert property (p_sop_first) else $error("fft_engine: packet does not start with sop");
  a_eop_last:  assert property (p_eop_last)  else $error("fft_engine: eop not on sample N");
endmodule
