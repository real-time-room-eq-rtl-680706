// tb_sine_lut -- compares every one of the 8192 phases of the default
// sine_lut with round(sin(2 pi p / 8192) * (2^23 - 1)) from $sin (one LSB
// tolerance), checks the one-cycle read latency and that `en` low holds the
// output.
module tb_sine_lut;
  logic clk = 0, en = 1;
  logic [12:0] phase = '0;
  logic signed [23:0] sine;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sine_lut dut (.clk, .en, .phase, .sine);

  function automatic int ref_sine(int p);
    real v = $sin(2.0 * 3.14159265358979323846 * p / 8192.0) * 8388607.0;
    return $rtoi(v + (v >= 0 ? 0.5 : -0.5));
  endfunction

  initial begin
    for (int p = 0; p < 8192; p++) begin
      phase = 13'(p);
      @(posedge clk); #1;
      checks++;
      if (int'(sine) - ref_sine(p) > 1 || ref_sine(p) - int'(sine) > 1) begin
        failures++;
        if (failures < 10) $display("phase %0d: got %0d expected %0d", p, sine, ref_sine(p));
      end
    end
    // hold
    phase = 13'd1000; @(posedge clk); #1;
    en = 0; phase = 13'd5000; @(posedge clk); #1;
    checks++;
    if (int'(sine) - ref_sine(1000) > 1 || ref_sine(1000) - int'(sine) > 1) begin
      failures++; $display("en low did not hold the output");
    end
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
