// sweep_generator -- logarithmic sine sweep source for the room measurement.
//
// Follows the document's algorithm: a phase accumulator whose increment grows
// geometrically, inc <- inc * k with k = exp(ln(F1/F0)/N), phase <- phase + inc,
// and the phase MSBs index the quarter-wave sine_lut. One sample is produced
// per audio frame. The increment carries INC_FRAC fractional bits below the
// PHASE_W-bit accumulator so the slow growth (k - 1 is about 2.9e-5 for a 5 s,
// 20 Hz - 20 kHz sweep) is not lost to truncation; the multiply is done as
// inc + (inc * K_FRAC) >> 32 with K_FRAC = round((k - 1) * 2^32). k, the start
// increment F0/FS and these widths are elaboration-time constants computed
// for SWEEP_N samples; a shorter SWEEP_LEN at run time stops the sweep early
// (at a lower end frequency), a longer one keeps rising past F1.
//
// Interface: `start` (one-cycle pulse) begins a sweep of `sweep_len` samples;
// `clear` aborts a sweep and drops `done`. The stream side is valid/ready:
// `sample_valid` is high while a sample waits and `sample_ready` (one pulse per
// frame from the I2S transmitter) takes it. After the `sweep_len`-th sample is
// taken `busy` falls and `done` rises and stays high until the next start or
// clear. Timing: the first sample is valid 3 cycles after `start`, each next
// one 3 cycles after the previous was taken. The first emitted sample is the
// phase after one step, as in the document's pseudo-code.
module sweep_generator #(
  parameter int unsigned FS       = 48000,   // sample rate, Hz
  parameter int unsigned F0       = 20,      // start frequency, Hz
  parameter int unsigned F1       = 20000,   // end frequency, Hz
  parameter int unsigned SWEEP_N  = 240000,  // samples of a full sweep (5 s)
  parameter int unsigned PHASE_W  = 32,      // phase accumulator bits
  parameter int unsigned INC_FRAC = 16,      // fraction bits of the increment
  parameter int unsigned LUT_W    = 13,      // phase bits into the sine LUT
  parameter int unsigned OUT_W    = 24
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic                    clear,
  input  logic [31:0]             sweep_len,
  output logic signed [OUT_W-1:0] sample,
  output logic                    sample_valid,
  input  logic                    sample_ready,
  output logic                    busy,
  output logic                    done
);
  localparam int unsigned IW = PHASE_W + INC_FRAC;
  localparam real K_M1  = $exp($ln(real'(F1) / real'(F0)) / real'(SWEEP_N)) - 1.0;
  localparam longint unsigned K_FRAC = longint'(K_M1 * 4294967296.0 + 0.5);
  localparam real INC0_R = real'(F0) / real'(FS) * (2.0 ** IW);
  localparam logic [IW-1:0] INC0 = IW'(longint'(INC0_R + 0.5));

  logic [IW-1:0]      inc;
  logic [PHASE_W-1:0] phase;
  logic [31:0]        emitted;
  logic [1:0]         wait_cnt;   // LUT latency after a phase step
  logic [IW+31:0]     prod;
  logic [IW-1:0]      inc_next;
  logic               take;

  assign prod     = inc * 32'(K_FRAC);
  assign inc_next = inc + prod[IW+31:32];
  assign take     = sample_valid && sample_ready;

  sine_lut #(.PHASE_W(LUT_W), .OUT_W(OUT_W)) u_lut (
    .clk   (clk),
    .en    (1'b1),
    .phase (phase[PHASE_W-1 -: LUT_W]),
    .sine  (sample)
  );

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      busy         <= 1'b0;
      done         <= 1'b0;
      sample_valid <= 1'b0;
      wait_cnt     <= '0;
      inc          <= INC0;
      phase        <= '0;
      emitted      <= '0;
    end else if (start) begin
      // first step of the recurrence; sample valid after the LUT latency
      inc          <= inc_next_from(INC0);
      phase        <= PHASE_W'(inc_next_from(INC0) >> INC_FRAC);
      emitted      <= '0;
      sample_valid <= 1'b0;
      done         <= (sweep_len == 0);
      busy         <= (sweep_len != 0);
      wait_cnt     <= 2'd2;
    end else if (busy) begin
      if (wait_cnt != 0) begin
        wait_cnt <= wait_cnt - 1'b1;
        if (wait_cnt == 2'd1) sample_valid <= 1'b1;
      end else if (take) begin
        sample_valid <= 1'b0;
        emitted      <= emitted + 1'b1;
        if (emitted + 1 == sweep_len) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          inc      <= inc_next;
          phase    <= phase + PHASE_W'(inc_next >> INC_FRAC);
          wait_cnt <= 2'd2;
        end
      end
    end
  end

  function automatic logic [IW-1:0] inc_next_from(input logic [IW-1:0] i);
    logic [IW+31:0] p;
    p = i * 32'(K_FRAC);
    return i + p[IW+31:32];
  endfunction
endmodule
