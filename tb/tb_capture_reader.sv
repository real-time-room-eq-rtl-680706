// tb_capture_reader -- fills a behavioural FIFO with 20 words, drains a
// 16-sample packet with random backpressure and checks order, sop on the
// first beat, eop on the 16th, one `streamed` pulse and no beat after it;
// then, with drain low, pops the remaining 4 words through the register-side
// port and checks a pop on an empty FIFO does nothing.
module tb_capture_reader;
  logic clk = 0, rst = 1;
  logic drain = 0, st_ready = 0, csr_pop = 0, wrreq = 0, aclr = 0;
  logic [23:0] wdata = '0;
  logic fifo_rdempty, fifo_rdreq, wrfull, streamed, st_valid, st_sop, st_eop, csr_empty;
  logic [23:0] fifo_q, st_data, csr_data;
  int checks = 0, failures = 0, beats = 0, streamed_cnt = 0;
  logic [23:0] words [20];

  always #5 clk = ~clk;

  dcfifo_model #(.DEPTH(64)) u_fifo (.aclr, .wrclk(clk), .wrreq, .data(wdata), .wrfull,
    .rdclk(clk), .rdreq(fifo_rdreq), .q(fifo_q), .rdempty(fifo_rdempty));
  capture_reader #(.N(16)) dut (.clk, .rst, .fifo_rdempty, .fifo_q, .fifo_rdreq, .drain,
    .streamed, .st_valid, .st_ready, .st_sop, .st_eop, .st_data, .csr_pop, .csr_data, .csr_empty);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    if (!rst && streamed) streamed_cnt++;
    if (st_valid && st_ready) begin
      check(beats < 16, "beat after the packet");
      if (beats < 16) check(st_data == words[beats], $sformatf("beat %0d data", beats));
      check(st_sop == (beats == 0), $sformatf("sop wrong at beat %0d", beats));
      check(st_eop == (beats == 15), $sformatf("eop wrong at beat %0d", beats));
      beats++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 20; i++) begin
      words[i] = 24'($urandom);
      wdata = words[i]; wrreq = 1; @(negedge clk);
    end
    wrreq = 0;
    drain = 1;
    repeat (100) begin
      st_ready = $urandom_range(0, 1);
      @(negedge clk);
    end
    st_ready = 1; repeat (20) @(negedge clk);
    check(beats == 16, $sformatf("beats=%0d", beats));
    check(streamed_cnt == 1, $sformatf("streamed pulses=%0d", streamed_cnt));
    drain = 0; st_ready = 0; @(negedge clk);
    for (int i = 16; i < 20; i++) begin
      check(!csr_empty && csr_data == words[i], $sformatf("csr word %0d", i));
      csr_pop = 1; @(negedge clk); csr_pop = 0; @(negedge clk);
    end
    check(csr_empty, "FIFO not empty after reading all");
    csr_pop = 1; @(negedge clk); csr_pop = 0;
    check(!fifo_rdreq, "rdreq on empty FIFO");
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
