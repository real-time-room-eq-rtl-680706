// coef_ram -- FIR coefficient memory, 128 taps x 24 bit x 2 channels.
//
// Written by the HPS through the register interface, read by fir_engine.
// The write address is TAPS*2 words wide: words 0..TAPS-1 hold the left
// channel's taps h[0]..h[TAPS-1] and words TAPS..2*TAPS-1 the right channel's,
// so the 256 sequential COEF_DATA writes of the document fill left then
// right (this ordering is this design's choice). The read port returns the
// same tap index of both channels at once, one clock after `raddr`, so the
// two channel MACs run in parallel. Taps are Q1.23. Contents start at zero
// (FPGA block RAM power-up state), i.e. a muted filter until loaded.
module coef_ram #(
  parameter int unsigned TAPS = 128,
  parameter int unsigned W    = 24
) (
  input  logic                        clk,
  input  logic                        we,
  input  logic [$clog2(2*TAPS)-1:0]   waddr,
  input  logic signed [W-1:0]         wdata,
  input  logic [$clog2(TAPS)-1:0]     raddr,
  output logic signed [W-1:0]         rdata_l,
  output logic signed [W-1:0]         rdata_r
);
  localparam int unsigned AW = $clog2(TAPS);

  logic signed [W-1:0] bank_l [TAPS];
  logic signed [W-1:0] bank_r [TAPS];

  initial begin
    for (int i = 0; i < int'(TAPS); i++) begin
      bank_l[i] = '0;
      bank_r[i] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (we && !waddr[AW]) bank_l[waddr[AW-1:0]] <= wdata;
    if (we &&  waddr[AW]) bank_r[waddr[AW-1:0]] <= wdata;
    rdata_l <= bank_l[raddr];
    rdata_r <= bank_r[raddr];
  end
endmodule
