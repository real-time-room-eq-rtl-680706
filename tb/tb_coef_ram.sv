// tb_coef_ram -- writes all 256 taps (left bank 0..127, right bank
// 128..255) with random Q1.23 values and checks that each read address
// returns the left and right tap of that index one clock later.
module tb_coef_ram;
  logic clk = 0, we = 0;
  logic [7:0] waddr = '0;
  logic [6:0] raddr = '0;
  logic signed [23:0] wdata = '0, rdata_l, rdata_r;
  logic [23:0] model [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  coef_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata_l, .rdata_r);

  initial begin
    @(negedge clk);
    checks++; raddr = 7'd3; @(negedge clk);
    if (rdata_l != 0 || rdata_r != 0) begin failures++; $display("not zero at start"); end
    for (int i = 0; i < 256; i++) begin
      we = 1; waddr = 8'(i); wdata = 24'($urandom); model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int j = 0; j < 500; j++) begin
      int a;
      a = $urandom_range(0, 127);
      raddr = 7'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata_l != model[a] || rdata_r != model[a + 128]) begin
        failures++; if (failures < 10) $display("tap %0d: got %h %h", a, rdata_l, rdata_r);
      end
    end
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
