// tb_fft_engine -- runs the FFT wrapper with a behavioural FFT core and the
// result RAM at N = 16 (and once more at N = 64): checks that nothing is
// accepted before `start`, that the packet reaches the core intact, that bins
// 0..N/2 land in fft_result_ram equal to a directly computed DFT scaled by
// 2^-exponent (one LSB tolerance), that the exponent is stored, and that
// `done` pulses exactly once per frame.
module tb_fft_engine;
  import room_eq_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // ---- N = 16 instance ----
  logic start = 0, done, busy, in_valid = 0, in_ready, in_sop = 0, in_eop = 0;
  logic [23:0] in_data = '0;
  logic snk_valid, snk_ready, snk_sop, snk_eop, snk_inverse, src_valid, src_ready, src_sop, src_eop;
  logic [23:0] snk_real, snk_imag, src_real, src_imag;
  logic [5:0] src_exp, exp_data, exp_out;
  logic ram_we, exp_we;
  logic [3:0] ram_addr, raddr = '0;
  bin_t ram_data, rdata;
  int done_cnt = 0;

  fft_engine #(.N(16)) dut (.clk, .rst, .start, .done, .busy, .in_valid, .in_ready, .in_sop,
    .in_eop, .in_data, .snk_valid, .snk_ready, .snk_sop, .snk_eop, .snk_real, .snk_imag,
    .snk_inverse, .src_valid, .src_ready, .src_sop, .src_eop, .src_real, .src_imag, .src_exp,
    .ram_we, .ram_addr, .ram_data, .exp_we, .exp_data);
  fft_core_model #(.N(16)) u_core (.clk, .reset(rst), .sink_valid(snk_valid), .sink_ready(snk_ready),
    .sink_sop(snk_sop), .sink_eop(snk_eop), .sink_real(snk_real), .sink_imag(snk_imag),
    .inverse(snk_inverse), .source_valid(src_valid), .source_ready(src_ready), .source_sop(src_sop),
    .source_eop(src_eop), .source_real(src_real), .source_imag(src_imag), .source_exp(src_exp));
  fft_result_ram #(.N(16)) u_ram (.clk, .we(ram_we), .waddr(ram_addr), .wdata(ram_data),
    .exp_we, .exp_in(exp_data), .raddr(raddr), .rdata, .exp_out);

  always @(posedge clk) if (!rst && done) done_cnt++;

  int x [64];

  task automatic send_packet(int n);
    for (int i = 0; i < n; i++) begin
      in_valid = 1; in_sop = (i == 0); in_eop = (i == n - 1); in_data = 24'(x[i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
      in_valid = 0;
      if ($urandom_range(0, 2) == 0) @(negedge clk);
    end
    in_valid = 0; in_sop = 0; in_eop = 0;
  endtask

  // direct DFT of x[0..n-1], bin k, scaled by 2^-e
  function automatic void dft(int n, int k, int e, output int re, output int im);
    real sr = 0.0, si = 0.0;
    for (int i = 0; i < n; i++) begin
      sr += real'(x[i]) * $cos(2.0 * 3.14159265358979323846 * k * i / n);
      si -= real'(x[i]) * $sin(2.0 * 3.14159265358979323846 * k * i / n);
    end
    sr /= 2.0 ** e; si /= 2.0 ** e;
    re = $rtoi(sr + (sr >= 0 ? 0.5 : -0.5));
    im = $rtoi(si + (si >= 0 ? 0.5 : -0.5));
  endfunction

  function automatic int expected_exp(int n);
    real m = 0.0;
    int e = 0;
    for (int k = 0; k < n; k++) begin
      real sr = 0.0, si = 0.0;
      for (int i = 0; i < n; i++) begin
        sr += real'(x[i]) * $cos(2.0 * 3.14159265358979323846 * k * i / n);
        si -= real'(x[i]) * $sin(2.0 * 3.14159265358979323846 * k * i / n);
      end
      if (sr > m) m = sr;
      if (-sr > m) m = -sr;
      if (si > m) m = si;
      if (-si > m) m = -si;
    end
    while (m / (2.0 ** e) > 8388606.0) e++;
    return e;
  endfunction

  task automatic frame(int amp);
    int e, re, im;
    for (int i = 0; i < 16; i++) x[i] = $urandom_range(0, 2 * amp) - amp;
    // not accepted before start
    in_valid = 1; in_sop = 1; in_data = 24'(x[0]);
    repeat (3) @(posedge clk);
    #1 check(!in_ready, "input accepted before start");
    in_valid = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    send_packet(16);
    for (int i = 0; i < 16; i++) check(int'(u_core.in_samples[i]) == x[i], $sformatf("core input %0d", i));
    wait (done_cnt > 0 && !busy);
    @(negedge clk);
    e = expected_exp(16);
    check(exp_out == 6'(e), $sformatf("exponent %0d expected %0d", exp_out, e));
    for (int k = 0; k <= 8; k++) begin
      raddr = 4'(k); @(negedge clk); @(negedge clk);
      dft(16, k, e, re, im);
      check(int'(rdata.re) - re <= 1 && re - int'(rdata.re) <= 1 &&
            int'(rdata.im) - im <= 1 && im - int'(rdata.im) <= 1,
            $sformatf("bin %0d: got %0d,%0d expected %0d,%0d", k, rdata.re, rdata.im, re, im));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    frame(1000);
    check(done_cnt == 1, $sformatf("done pulses %0d", done_cnt));
    frame(8000000);                     // forces a non-zero exponent
    check(done_cnt == 2, $sformatf("done pulses %0d", done_cnt));
    check(exp_out != 0, "large input gave exponent 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
