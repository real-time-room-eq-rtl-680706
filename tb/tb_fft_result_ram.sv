// tb_fft_result_ram -- fills all 4097 bins of the default-size result RAM
// with random complex values, reads every bin back once in order and then
// 3000 at random addresses, checking the data and the one-cycle read latency;
// also checks the exponent register.
module tb_fft_result_ram;
  import room_eq_pkg::*;
  logic clk = 0;
  logic we = 0, exp_we = 0;
  logic [12:0] waddr = '0, raddr = '0;
  bin_t wdata = '0, rdata;
  logic [5:0] exp_in = '0, exp_out;
  bin_t model [4097];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fft_result_ram dut (.clk, .we, .waddr, .wdata, .exp_we, .exp_in, .raddr, .rdata, .exp_out);

  initial begin
    for (int i = 0; i < 4097; i++) begin
      @(negedge clk);
      we = 1; waddr = 13'(i); wdata = bin_t'({$urandom, $urandom});
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    exp_in = 6'd37; exp_we = 1; @(negedge clk); exp_we = 0; exp_in = 6'd5; @(negedge clk);
    checks++; if (exp_out != 6'd37) begin failures++; $display("exponent"); end
    // every bin once in order, then random addresses
    for (int j = 0; j < 4097 + 3000; j++) begin
      int a;
      a = (j < 4097) ? j : $urandom_range(0, 4096);
      raddr = 13'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata != model[a]) begin
        failures++; if (failures < 10) $display("addr %0d: got %h expected %h", a, rdata, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
