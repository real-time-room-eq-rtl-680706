// tb_delay_line_ram -- random writes and reads of the 128-word stereo delay
// line against a model: read data one clock after the address, and the old
// word when reading the address being written.
module tb_delay_line_ram;
  import room_eq_pkg::*;
  logic clk = 0, we = 0;
  logic [6:0] waddr = '0, raddr = '0;
  stereo_t wdata = '0, rdata;
  stereo_t model [128];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  delay_line_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); we = 1; waddr = 7'(i); wdata = stereo_t'({$urandom, $urandom}); model[i] = wdata;
    end
    for (int j = 0; j < 2000; j++) begin
      stereo_t expv;
      @(negedge clk);
      we = $urandom_range(0, 1);
      waddr = 7'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 7'($urandom);
      wdata = stereo_t'({$urandom, $urandom});
      expv = model[raddr];
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      checks++;
      if (rdata != expv) begin
        failures++; if (failures < 10) $display("addr %0d: got %h expected %h", raddr, rdata, expv);
      end
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
