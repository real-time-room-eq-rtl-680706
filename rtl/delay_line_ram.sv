// delay_line_ram -- FIR delay line, 128 stereo samples of 24 bits.
//
// The document's FIR keeps its past inputs in a circular buffer indexed
// mod 128; the index arithmetic lives in fir_engine, this module is the
// storage: one write port and one synchronous read port (data one clock
// after `raddr`), each word holding the left and right sample of one frame.
// Reading the address being written in the same cycle returns the old word.
module delay_line_ram
  import room_eq_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  stereo_t                  wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output stereo_t                  rdata
);
  stereo_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
