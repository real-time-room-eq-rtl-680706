// tb_fir_engine -- loads random Q1.23 taps into the default 128-tap stereo
// FIR and checks 300 random stereo samples against a direct-form model
// y[n] = sat(round(sum h[k] x[n-k] / 2^23)) with zero initial history, then a
// saturating case, the output latency (TAPS+3 = 131 cycles, within the 128
// MAC cycles per sample the document budgets plus the pipeline), bypass mode
// (input passed through) and disabled mode (silence).
module tb_fir_engine;
  localparam int TAPS = 128;
  logic clk = 0, rst = 1;
  logic enable = 0, bypass = 0, ready, coef_we = 0, in_valid = 0, in_ready, out_valid;
  logic [7:0] coef_waddr = '0;
  logic signed [23:0] coef_wdata = '0, in_l = '0, in_r = '0, out_l, out_r;
  int checks = 0, failures = 0;
  int hl [TAPS], hr [TAPS];
  int xl [$], xr [$];

  always #10 clk = ~clk;

  fir_engine dut (.clk, .rst, .enable, .bypass, .ready, .coef_we, .coef_waddr, .coef_wdata,
    .in_valid, .in_ready, .in_l, .in_r, .out_valid, .out_l, .out_r);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  function automatic int model(ref int x [$], ref int h [TAPS]);
    longint acc = 0;
    int n = x.size() - 1;
    for (int k = 0; k < TAPS; k++)
      if (n - k >= 0) acc += longint'(h[k]) * longint'(x[n - k]);
    acc = (acc + (longint'(1) << 22)) >>> 23;
    if (acc > 8388607) acc = 8388607;
    if (acc < -8388608) acc = -8388608;
    return int'(acc);
  endfunction

  task automatic load(int amp, int fixed);
    for (int i = 0; i < 2 * TAPS; i++) begin
      int v = (fixed != 0) ? fixed : $urandom_range(0, 2 * amp) - amp;
      if (i < TAPS) hl[i] = v; else hr[i - TAPS] = v;
      @(negedge clk); coef_we = 1; coef_waddr = 8'(i); coef_wdata = 24'(v);
    end
    @(negedge clk); coef_we = 0;
  endtask

  task automatic sample(int l, int r, output int lat, output int gl, output int gr);
    while (!in_ready) @(negedge clk);
    in_l = 24'(l); in_r = 24'(r); in_valid = 1;
    @(negedge clk); in_valid = 0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    gl = int'(out_l); gr = int'(out_r);
    @(negedge clk);
  endtask

  initial begin
    int lat, gl, gr, el, er;
    repeat (3) @(negedge clk);
    rst = 0;
    check(!ready, "ready during delay-line clear");
    load(1 << 19, 0);
    enable = 1;
    @(negedge clk);
    check(ready, "fir_ready not set");
    for (int n = 0; n < 300; n++) begin
      int l, r;
      l = $urandom_range(0, 16777215) - 8388608;
      r = $urandom_range(0, 16777215) - 8388608;
      xl.push_back(l); xr.push_back(r);
      sample(l, r, lat, gl, gr);
      el = model(xl, hl); er = model(xr, hr);
      check(gl == el && gr == er, $sformatf("n=%0d got %0d,%0d expected %0d,%0d", n, gl, gr, el, er));
      check(lat == TAPS + 3, $sformatf("latency %0d", lat));
    end
    // saturation: all taps near +1, full-scale input
    load(0, 8388607);
    for (int n = 0; n < TAPS; n++) begin   // fill the whole delay line
      xl.push_back(8388607); xr.push_back(-8388608);
      sample(8388607, -8388608, lat, gl, gr);
      el = model(xl, hl); er = model(xr, hr);
      check(gl == el && gr == er, $sformatf("sat n=%0d got %0d,%0d expected %0d,%0d", n, gl, gr, el, er));
    end
    check(gl == 8388607 && gr == -8388608, "no saturation reached");
    // bypass
    bypass = 1;
    sample(123456, -654321, lat, gl, gr);
    check(gl == 123456 && gr == -654321 && lat == 1, "bypass");
    bypass = 0; enable = 0;
    sample(123456, -654321, lat, gl, gr);
    check(gl == 0 && gr == 0, "disabled output not silent");
    check(!ready, "ready while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
