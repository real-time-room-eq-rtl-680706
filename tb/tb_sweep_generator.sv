// tb_sweep_generator -- checks the log sweep sample by sample against an
// independent model of the document's recurrence (inc *= k; phase += inc;
// sample = sin of the phase MSBs), written with 128-bit integers and $sin,
// for the default 5 s sweep constants (first 3000 samples) and for a
// 2000-sample sweep, whose final instantaneous frequency must be within 1 %
// of 20 kHz and whose frequency at the midpoint must be near
// sqrt(20 * 20000) Hz. Also checks the sample count, `done`, `busy`, the
// 3-cycle latency from start to the first valid sample, and `clear`.
module tb_sweep_generator;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic start_a = 0, clear_a = 0, ready_a = 0, valid_a, busy_a, done_a;
  logic start_b = 0, clear_b = 0, ready_b = 0, valid_b, busy_b, done_b;
  logic [31:0] len_a = 3000, len_b = 2000;
  logic signed [23:0] sample_a, sample_b;

  sweep_generator dut_a (.clk, .rst, .start(start_a), .clear(clear_a), .sweep_len(len_a),
    .sample(sample_a), .sample_valid(valid_a), .sample_ready(ready_a), .busy(busy_a), .done(done_a));
  sweep_generator #(.SWEEP_N(2000)) dut_b (.clk, .rst, .start(start_b), .clear(clear_b),
    .sweep_len(len_b), .sample(sample_b), .sample_valid(valid_b), .sample_ready(ready_b),
    .busy(busy_b), .done(done_b));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  function automatic int ref_sine(longint unsigned ph);
    int p = int'((ph >> 19) & 13'h1fff);
    real v = $sin(2.0 * 3.14159265358979323846 * p / 8192.0) * 8388607.0;
    return $rtoi(v + (v >= 0 ? 0.5 : -0.5));
  endfunction

  // run one sweep of `len` samples against the model; returns final inc
  task automatic run(input int which, input int n_design, input int len, output real f_end, output real f_mid);
    logic [127:0] inc, kf, prod;
    longint unsigned phase;
    real k;
    int lat;
    k = $exp($ln(1000.0) / n_design) - 1.0;
    kf = 128'(longint'(k * 4294967296.0 + 0.5));
    inc = 128'(longint'(20.0 / 48000.0 * (2.0 ** 48) + 0.5));
    phase = 0;
    f_mid = 0.0;
    @(negedge clk);
    if (which == 0) start_a = 1; else start_b = 1;
    @(negedge clk);
    start_a = 0; start_b = 0;
    lat = 1;
    while (!(which == 0 ? valid_a : valid_b)) begin @(negedge clk); lat++; end
    check(lat == 3, $sformatf("first sample after %0d cycles, expected 3", lat));
    for (int n = 0; n < len; n++) begin
      prod = (inc * kf) >> 32;
      inc = inc + prod;
      inc = inc & ((128'(1) << 48) - 1);
      phase = (phase + longint'(inc >> 16)) & 64'hffff_ffff;
      while (!(which == 0 ? valid_a : valid_b)) @(negedge clk);
      begin
        int got = which == 0 ? int'(sample_a) : int'(sample_b);
        int exp_v = ref_sine(phase);
        check(got - exp_v <= 1 && exp_v - got <= 1,
              $sformatf("sweep %0d sample %0d: got %0d expected %0d", which, n, got, exp_v));
      end
      check((which == 0 ? busy_a : busy_b) && !(which == 0 ? done_a : done_b), "busy/done during sweep");
      if (n == len / 2) f_mid = real'(inc) / (2.0 ** 48) * 48000.0;
      // take it after a few cycles
      repeat ($urandom_range(0, 3)) @(negedge clk);
      if (which == 0) ready_a = 1; else ready_b = 1;
      @(negedge clk);
      ready_a = 0; ready_b = 0;
    end
    check(!(which == 0 ? busy_a : busy_b) && (which == 0 ? done_a : done_b), "done not raised after last sample");
    repeat (5) @(negedge clk);
    check(!(which == 0 ? valid_a : valid_b), "sample offered after the end");
    f_end = real'(inc) / (2.0 ** 48) * 48000.0;
  endtask

  initial begin
    real fe, fm;
    repeat (3) @(negedge clk);
    rst = 0;
    run(0, 240000, 3000, fe, fm);
    // 3000 of 240000 samples: 20 * 1000^(3000/240000) Hz
    check(fe > 20.0 * (1000.0 ** (3000.0 / 240000.0)) * 0.999 &&
          fe < 20.0 * (1000.0 ** (3000.0 / 240000.0)) * 1.001, $sformatf("default sweep freq %f", fe));
    run(1, 2000, 2000, fe, fm);
    check(fe > 19800.0 && fe < 20200.0, $sformatf("end frequency %f Hz", fe));
    check(fm > 620.0 && fm < 650.0, $sformatf("mid frequency %f Hz", fm));
    // clear drops done
    @(negedge clk); clear_b = 1; @(negedge clk); clear_b = 0;
    check(!done_b && !busy_b, "clear did not drop done");
    // abort mid-sweep
    @(negedge clk); start_a = 1; @(negedge clk); start_a = 0;
    repeat (10) @(negedge clk);
    check(busy_a, "second sweep not busy");
    clear_a = 1; @(negedge clk); clear_a = 0;
    check(!busy_a && !done_a && !valid_a, "clear did not abort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
