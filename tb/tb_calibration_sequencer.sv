// tb_calibration_sequencer -- walks the FSM through every transition of the
// sequencer diagram (normal run to DONE, overflow to ERROR, soft_reset from
// both, soft_reset from SWEEP) and checks the state, the control outputs in
// each state, the fft_start pulse and the sticky status flags.
module tb_calibration_sequencer;
  import room_eq_pkg::*;
  logic clk = 0, rst = 1;
  logic start_sweep = 0, soft_reset = 0, sweep_done = 0, streamed = 0, overflow = 0, fft_complete = 0;
  seq_state_t state;
  logic sweep_req, capture_en, drain, fft_start, busy, f_sd, f_ov, f_fd;
  int checks = 0, failures = 0, fft_start_cnt = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && fft_start) fft_start_cnt++;

  calibration_sequencer dut (.clk, .rst, .start_sweep, .soft_reset, .sweep_done, .streamed,
    .overflow, .fft_complete, .state, .sweep_req, .capture_en, .drain, .fft_start, .busy,
    .flag_sweep_done(f_sd), .flag_overflow(f_ov), .flag_fft_done(f_fd));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %s)", msg, state.name()); end
  endtask

  task automatic pulse(ref logic s);
    s = 1; @(negedge clk); s = 0; @(negedge clk);
  endtask

  task automatic outs(seq_state_t st, bit req, bit cap, bit dr);
    check(state == st, $sformatf("expected state %s", st.name()));
    check(sweep_req == req && capture_en == cap && drain == dr && busy == (st != SEQ_IDLE),
          "control outputs");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0; @(negedge clk);
    outs(SEQ_IDLE, 0, 0, 0);
    pulse(streamed); outs(SEQ_IDLE, 0, 0, 0);          // ignored in IDLE
    pulse(start_sweep); outs(SEQ_SWEEP, 1, 1, 0);
    check(!f_sd && !f_ov && !f_fd, "flags clear at start");
    pulse(streamed); outs(SEQ_SWEEP, 1, 1, 0);
    sweep_done = 1; @(negedge clk); sweep_done = 0;
    check(fft_start && state == SEQ_CAPTURE, "fft_start pulse on entering CAPTURE");
    @(negedge clk);
    outs(SEQ_CAPTURE, 0, 1, 1);
    check(f_sd, "sweep_done flag");
    pulse(fft_complete); outs(SEQ_CAPTURE, 0, 1, 1);
    pulse(streamed); outs(SEQ_FFT, 0, 0, 0);
    pulse(start_sweep); outs(SEQ_FFT, 0, 0, 0);
    pulse(fft_complete); outs(SEQ_DONE, 0, 0, 0);
    check(f_fd && f_sd && !f_ov, "fft_done flag");
    pulse(start_sweep); outs(SEQ_DONE, 0, 0, 0);        // only soft_reset leaves DONE
    pulse(soft_reset); outs(SEQ_IDLE, 0, 0, 0);
    check(!f_fd && !f_sd, "soft_reset clears flags");
    // overflow path
    pulse(start_sweep);
    sweep_done = 1; @(negedge clk); sweep_done = 0; @(negedge clk);
    overflow = 1; streamed = 1; @(negedge clk); overflow = 0; streamed = 0; @(negedge clk);
    outs(SEQ_ERROR, 0, 0, 0);
    check(f_ov, "overflow flag");
    pulse(start_sweep); outs(SEQ_ERROR, 0, 0, 0);
    pulse(soft_reset); outs(SEQ_IDLE, 0, 0, 0);
    // soft reset during SWEEP
    pulse(start_sweep); outs(SEQ_SWEEP, 1, 1, 0);
    pulse(soft_reset); outs(SEQ_IDLE, 0, 0, 0);
    check(fft_start_cnt == 2, $sformatf("fft_start pulses=%0d", fft_start_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
