// fft_core_model -- behavioural stand-in for the vendor FFT core (streaming,
// block floating point, natural output order) in simulation.
//
// Accepts one AvalonST packet of N real samples (sink_ready is high while it
// collects), computes the N-point DFT X[k] = sum x[n] exp(-j 2 pi k n / N)
// with a radix-2 FFT in real arithmetic, then picks the smallest exponent e
// >= 0 for which every real and imaginary part of X / 2^e fits in W bits,
// and streams the rounded X / 2^e for k = 0..N-1 with sop/eop, source_exp = e
// on every beat. `latency` idle cycles separate input and output. The exact
// values are kept in re_ref/im_ref for testbenches to compare with.
module fft_core_model #(
  parameter int N = 8192,
  parameter int W = 24
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                sink_valid,
  output logic                sink_ready,
  input  logic                sink_sop,
  input  logic                sink_eop,
  input  logic signed [W-1:0] sink_real,
  input  logic signed [W-1:0] sink_imag,
  input  logic                inverse,
  output logic                source_valid,
  input  logic                source_ready,
  output logic                source_sop,
  output logic                source_eop,
  output logic signed [W-1:0] source_real,
  output logic signed [W-1:0] source_imag,
  output logic [5:0]          source_exp
);
  real xr [N], xi [N];
  real re_ref [N], im_ref [N];
  logic signed [W-1:0] in_samples [N];
  int  n_in = 0, n_out = 0;
  int  phase = 0;          // 0 collect, 1 compute wait, 2 output
  int  wait_cnt = 0;
  int  latency = 20;
  int  packets_in = 0, packets_out = 0, framing_errors = 0;
  int  exponent = 0;

  function automatic int bitrev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

  task automatic compute();
    int bits = $clog2(N);
    real ar [N], ai [N];
    real maxv, lim;
    for (int i = 0; i < N; i++) begin
      ar[bitrev(i, bits)] = xr[i];
      ai[bitrev(i, bits)] = xi[i];
    end
    for (int len = 2; len <= N; len *= 2) begin
      for (int s = 0; s < N; s += len) begin
        for (int j = 0; j < len / 2; j++) begin
          real wr, wi, tr, ti;
          wr = $cos(2.0 * 3.14159265358979323846 * j / len);
          wi = -$sin(2.0 * 3.14159265358979323846 * j / len);
          tr = ar[s+j+len/2] * wr - ai[s+j+len/2] * wi;
          ti = ar[s+j+len/2] * wi + ai[s+j+len/2] * wr;
          ar[s+j+len/2] = ar[s+j] - tr;
          ai[s+j+len/2] = ai[s+j] - ti;
          ar[s+j] = ar[s+j] + tr;
          ai[s+j] = ai[s+j] + ti;
        end
      end
    end
    maxv = 0.0;
    for (int i = 0; i < N; i++) begin
      re_ref[i] = ar[i]; im_ref[i] = ai[i];
      if (ar[i] > maxv) maxv = ar[i];
      if (-ar[i] > maxv) maxv = -ar[i];
      if (ai[i] > maxv) maxv = ai[i];
      if (-ai[i] > maxv) maxv = -ai[i];
    end
    lim = real'((1 << (W - 1)) - 1);
    exponent = 0;
    while (maxv / (2.0 ** exponent) > lim - 1.0) exponent++;
  endtask

  function automatic logic signed [W-1:0] scaled(real v);
    return W'($rtoi(v / (2.0 ** exponent) + (v >= 0 ? 0.5 : -0.5)));
  endfunction

  assign sink_ready   = (phase == 0) && !reset;
  assign source_valid = (phase == 2);
  assign source_sop   = (phase == 2) && n_out == 0;
  assign source_eop   = (phase == 2) && n_out == N - 1;
  assign source_real  = (phase == 2) ? scaled(re_ref[n_out]) : '0;
  assign source_imag  = (phase == 2) ? scaled(im_ref[n_out]) : '0;
  assign source_exp   = 6'(exponent);

  always @(posedge clk) begin
    if (reset) begin
      phase <= 0; n_in <= 0; n_out <= 0;
    end else begin
      case (phase)
        0: if (sink_valid) begin
          if ((n_in == 0) != sink_sop || (n_in == N - 1) != sink_eop || inverse) framing_errors++;
          xr[n_in] = real'(sink_real);
          xi[n_in] = real'(sink_imag);
          in_samples[n_in] = sink_real;
          if (n_in == N - 1) begin
            n_in <= 0; phase <= 1; wait_cnt <= latency; packets_in++;
            compute();
          end else n_in <= n_in + 1;
        end
        1: if (wait_cnt == 0) begin phase <= 2; n_out <= 0; end
           else wait_cnt <= wait_cnt - 1;
        2: if (source_ready) begin
          if (n_out == N - 1) begin phase <= 0; packets_out++; end
          n_out <= n_out + 1;
        end
        default: phase <= 0;
      endcase
    end
  end
endmodule
