// calibration_sequencer -- FSM that runs one room measurement.
//
// States and transitions follow the document's sequencer diagram:
//   IDLE    --start_sweep-->               SWEEP
//   SWEEP   --SWEEP_LEN samples emitted--> CAPTURE
//   CAPTURE --N samples streamed-->        FFT
//   CAPTURE --capture overflow-->          ERROR
//   FFT     --FFT complete-->              DONE
//   DONE, ERROR --soft_reset-->            IDLE
// The FSM rests in IDLE while the real-time path runs. start_sweep is taken
// only in IDLE: after DONE or ERROR the driver issues a soft reset first (the
// diagram's only way back). Beyond the diagram,
// this design lets soft_reset return every state to IDLE (it is a reset) and
// gives overflow priority over "streamed" in CAPTURE.
//
// Outputs (levels unless noted): `sweep_req` in SWEEP (the sweep generator
// stops when it falls); `capture_en` in SWEEP and CAPTURE, so mic samples are
// recorded from the start of the sweep; `drain` in CAPTURE (unless overflow is
// already set, so a failed capture stays in the FIFO for the HPS to read),
// which streams the capture FIFO into the FFT; `fft_start`, a one-cycle pulse on entering
// CAPTURE, arms the FFT wrapper before the packet arrives. Sticky status
// flags sweep_done / capture_overflow / fft_done are cleared by a new start
// or a soft reset. `sweep_done` and `overflow` inputs are levels already
// synchronized to clk; `streamed` and `fft_complete` are one-cycle pulses.
module calibration_sequencer
  import room_eq_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start_sweep,
  input  logic       soft_reset,
  input  logic       sweep_done,
  input  logic       streamed,
  input  logic       overflow,
  input  logic       fft_complete,
  output seq_state_t state,
  output logic       sweep_req,
  output logic       capture_en,
  output logic       drain,
  output logic       fft_start,
  output logic       busy,
  output logic       flag_sweep_done,
  output logic       flag_overflow,
  output logic       flag_fft_done
);
  seq_state_t next;

  always_comb begin
    next = state;
    unique case (state)
      SEQ_IDLE:    if (start_sweep)  next = SEQ_SWEEP;
      SEQ_SWEEP:   if (sweep_done)   next = SEQ_CAPTURE;
      SEQ_CAPTURE: if (overflow)     next = SEQ_ERROR;
                   else if (streamed) next = SEQ_FFT;
      SEQ_FFT:     if (fft_complete) next = SEQ_DONE;
      SEQ_DONE:    ;
      SEQ_ERROR:   ;
      default:     next = SEQ_IDLE;
    endcase
    if (soft_reset) next = SEQ_IDLE;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= SEQ_IDLE;
      fft_start       <= 1'b0;
      flag_sweep_done <= 1'b0;
      flag_overflow   <= 1'b0;
      flag_fft_done   <= 1'b0;
    end else begin
      state     <= next;
      fft_start <= (state == SEQ_SWEEP) && (next == SEQ_CAPTURE);
      if (soft_reset || (state == SEQ_IDLE && start_sweep)) begin
        flag_sweep_done <= 1'b0;
        flag_overflow   <= 1'b0;
        flag_fft_done   <= 1'b0;
      end else begin
        if (state == SEQ_SWEEP   && next == SEQ_CAPTURE) flag_sweep_done <= 1'b1;
        if (state == SEQ_CAPTURE && next == SEQ_ERROR)   flag_overflow   <= 1'b1;
        if (state == SEQ_FFT     && next == SEQ_DONE)    flag_fft_done   <= 1'b1;
      end
    end
  end

  assign sweep_req  = (state == SEQ_SWEEP);
  assign capture_en = (state == SEQ_SWEEP) || (state == SEQ_CAPTURE);
  assign drain      = (state == SEQ_CAPTURE) && !overflow;
  assign busy       = (state != SEQ_IDLE);
endmodule
