// tb_cdc_sync -- checks that cdc_sync delays a level by exactly two clocks,
// starts at its reset value, and that a three-stage instance delays by three.
module tb_cdc_sync;
  logic clk = 0, rst = 1, d = 0;
  logic q2, q3;
  int checks = 0, failures = 0;
  logic [7:0] hist = '0;

  always #5 clk = ~clk;

  cdc_sync #(.STAGES(2)) dut2 (.clk, .rst, .d, .q(q2));
  cdc_sync #(.STAGES(3), .RESET_VAL(1'b1)) dut3 (.clk, .rst, .d, .q(q3));

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++; if (q2 !== 1'b0 || q3 !== 1'b1) begin failures++; $display("reset value wrong"); end
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1;
      hist = {hist[6:0], d};
      if (i >= 4) begin
        checks++;
        if (q2 !== hist[1] || q3 !== hist[2]) begin
          failures++; $display("cycle %0d: q2=%b q3=%b expected %b %b", i, q2, q3, hist[1], hist[2]);
        end
      end
      d = $urandom_range(0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
