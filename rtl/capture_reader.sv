// capture_reader -- read side of the capture FIFO (system clock domain).
//
// Turns the dual-clock FIFO's read port into the AvalonST stream that feeds
// the FFT: while `drain` is high it forwards FIFO words with valid/ready and
// frames exactly N samples as one packet, `sop` on the first and `eop` on the
// N-th, as the document requires for the FFT core. When the N-th sample is
// accepted `streamed` pulses and nothing more is sent until `drain` falls.
// While `drain` is low the FIFO head is offered to the register interface
// instead: `csr_pop` removes one word (ignored when the FIFO is empty), which
// is how the HPS reads raw captured samples for debugging.
//
// The FIFO is assumed to run in show-ahead mode (`q` shows the head word
// whenever `rdempty` is low, `rdreq` acknowledges it). Framing counter, the
// sharing of the read port and the show-ahead mode are this design's choice.
module capture_reader #(
  parameter int unsigned N = 8192,
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst,
  // dcfifo read side
  input  logic         fifo_rdempty,
  input  logic [W-1:0] fifo_q,
  output logic         fifo_rdreq,
  // control
  input  logic         drain,
  output logic         streamed,
  // AvalonST source to the FFT
  output logic         st_valid,
  input  logic         st_ready,
  output logic         st_sop,
  output logic         st_eop,
  output logic [W-1:0] st_data,
  // register-interface readout
  input  logic         csr_pop,
  output logic [W-1:0] csr_data,
  output logic         csr_empty
);
  localparam int unsigned CW = $clog2(N);

  logic [CW-1:0] count;
  logic          sent_all;
  logic          take;

  assign st_valid   = drain && !sent_all && !fifo_rdempty;
  assign st_data    = fifo_q;
  assign st_sop     = (count == '0);
  assign st_eop     = (count == CW'(N - 1));
  assign take       = st_valid && st_ready;
  assign fifo_rdreq = take || (!drain && csr_pop && !fifo_rdempty);
  assign csr_data   = fifo_q;
  assign csr_empty  = fifo_rdempty;

  always_ff @(posedge clk) begin
    if (rst || !drain) begin
      count    <= '0;
      sent_all <= 1'b0;
      streamed <= 1'b0;
    end else begin
      streamed <= 1'b0;
      if (take) begin
        count <= count + 1'b1;
        if (st_eop) begin
          sent_all <= 1'b1;
          streamed <= 1'b1;
        end
      end
    end
  end
endmodule
