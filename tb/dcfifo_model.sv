// dcfifo_model -- behavioural dual-clock FIFO standing in for the vendor
// dcfifo (show-ahead mode) in simulation.
//
// Write side on wrclk (wrreq/data/wrfull), read side on rdclk (rdreq/q/
// rdempty, q shows the head word while rdempty is low), asynchronous clear.
// `limit` (default DEPTH) lets a testbench shrink the usable depth at run time
// to provoke a full FIFO. Flags follow the pointers at once (no synchronizer
// latency as in the real part).
module dcfifo_model #(
  parameter int DEPTH = 8192,
  parameter int W     = 24
) (
  input  logic         aclr,
  input  logic         wrclk,
  input  logic         wrreq,
  input  logic [W-1:0] data,
  output logic         wrfull,
  input  logic         rdclk,
  input  logic         rdreq,
  output logic [W-1:0] q,
  output logic         rdempty
);
  logic [W-1:0] mem [DEPTH];
  int wr_ptr = 0, rd_ptr = 0;
  int limit = DEPTH;
  int writes = 0;

  always @(posedge wrclk or posedge aclr) begin
    if (aclr) wr_ptr <= 0;
    else if (wrreq && (wr_ptr - rd_ptr) < limit) begin
      mem[wr_ptr % DEPTH] <= data;
      wr_ptr <= wr_ptr + 1;
      writes <= writes + 1;
    end
  end

  always @(posedge rdclk or posedge aclr) begin
    if (aclr) rd_ptr <= 0;
    else if (rdreq && wr_ptr != rd_ptr) rd_ptr <= rd_ptr + 1;
  end

  assign wrfull  = (wr_ptr - rd_ptr) >= limit;
  assign rdempty = (wr_ptr == rd_ptr);
  assign q       = mem[rd_ptr % DEPTH];
endmodule
