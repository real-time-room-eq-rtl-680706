// capture_writer -- write side of the calibration capture path (XCK domain).
//
// While `capture_en` is high the microphone channel (left ADC channel) of
// each received frame is pushed into the capture dual-clock FIFO, until
// WINDOW samples (the FFT length) have been written: the capture window is
// the first WINDOW mic samples after capture is enabled, i.e. after the sweep
// starts. A sample that arrives inside the window while the FIFO reports full
// is lost; `overflow` then rises and writing stops for this window (the
// sequencer goes to its ERROR state). A rising edge of `capture_en` starts a
// new window and clears `overflow` and `window_done`.
//
// The document states the FIFO's role ("mic samples during sweep, 8192 x
// 24b"), the 8192-sample packet and the overflow error; the window rule, the
// choice of the left channel and the flag behaviour are this design's own.
// FIFO interface: dcfifo write side, `wrreq` with `data` in the same cycle.
module capture_writer #(
  parameter int unsigned WINDOW = 8192,
  parameter int unsigned W      = 24
) (
  input  logic         clk,          // XCK
  input  logic         rst,
  input  logic         capture_en,   // level, already synchronized to clk
  input  logic [W-1:0] sample,
  input  logic         sample_valid,
  input  logic         fifo_wrfull,
  output logic         fifo_wrreq,
  output logic [W-1:0] fifo_data,
  output logic         overflow,
  output logic         window_done
);
  localparam int unsigned CW = $clog2(WINDOW + 1);

  logic [CW-1:0] count;
  logic          en_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      count       <= '0;
      en_d        <= 1'b0;
      overflow    <= 1'b0;
      window_done <= 1'b0;
      fifo_wrreq  <= 1'b0;
      fifo_data   <= '0;
    end else begin
      en_d       <= capture_en;
      fifo_wrreq <= 1'b0;
      if (capture_en && !en_d) begin
        count       <= '0;
        overflow    <= 1'b0;
        window_done <= 1'b0;
      end else if (capture_en && sample_valid && !overflow && !window_done) begin
        if (fifo_wrfull) begin
          overflow <= 1'b1;
        end else begin
          fifo_wrreq <= 1'b1;
          fifo_data  <= sample;
          count      <= count + 1'b1;
          if (count == CW'(WINDOW - 1)) window_done <= 1'b1;
        end
      end
    end
  end
endmodule
