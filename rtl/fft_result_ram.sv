// fft_result_ram -- holds one frame of FFT output for the HPS to read.
//
// N/2+1 complex bins (4097 for the document's 8192-point FFT: bins 0 to
// Nyquist of a real input), each 24-bit real + 24-bit imaginary, plus the
// frame's shared 6-bit block floating-point exponent, as in the document's
// memory table and bit widths. Simple dual-port: the FFT wrapper writes
// (`we`, `waddr`, `wdata`; `exp_we` loads the exponent register), the
// register interface reads. The read is synchronous: `rdata` shows the bin at
// `raddr` one clock later, as block RAM does. Port layout is this design's.
module fft_result_ram
  import room_eq_pkg::*;
#(
  parameter int unsigned N = 8192
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(N/2+1)-1:0] waddr,
  input  bin_t                     wdata,
  input  logic                     exp_we,
  input  logic [EXP_W-1:0]         exp_in,
  input  logic [$clog2(N/2+1)-1:0] raddr,
  output bin_t                     rdata,
  output logic [EXP_W-1:0]         exp_out
);
  localparam int unsigned DEPTH = N/2 + 1;

  bin_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
    if (exp_we) exp_out <= exp_in;
    rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end
endmodule
