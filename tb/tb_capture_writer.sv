// tb_capture_writer -- with a 16-sample window: checks that exactly the first
// 16 samples after capture_en rises are written, in order and only while
// enabled; that samples arriving while the FIFO is full raise `overflow` and
// stop writing; and that a new rising capture_en clears the flags.
module tb_capture_writer;
  logic clk = 0, rst = 1;
  logic capture_en = 0, sample_valid = 0, fifo_wrfull = 0, fifo_wrreq, overflow, window_done;
  logic [23:0] sample = '0, fifo_data;
  int checks = 0, failures = 0;
  logic [23:0] exp_q [$];
  int writes = 0;

  always #5 clk = ~clk;

  capture_writer #(.WINDOW(16)) dut (.clk, .rst, .capture_en, .sample, .sample_valid,
    .fifo_wrfull, .fifo_wrreq, .fifo_data, .overflow, .window_done);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && fifo_wrreq) begin
    writes++;
    if (exp_q.size() == 0) check(0, "unexpected write");
    else check(fifo_data == exp_q.pop_front(), "wrong data written");
  end

  task automatic send(input bit expect_write);
    @(negedge clk);
    sample = 24'($urandom);
    sample_valid = 1;
    if (expect_write) exp_q.push_back(sample);
    @(negedge clk);
    sample_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    send(0);                               // not enabled
    check(writes == 0, "wrote while disabled");
    capture_en = 1; @(negedge clk);
    for (int i = 0; i < 16; i++) send(1);
    check(window_done, "window_done not set after 16");
    for (int i = 0; i < 5; i++) send(0);   // window full: ignored
    check(writes == 16 && !overflow, $sformatf("writes=%0d overflow=%b", writes, overflow));
    capture_en = 0; @(negedge clk); @(negedge clk);
    // second window, FIFO goes full after 4
    capture_en = 1; @(negedge clk); @(negedge clk);
    check(!window_done && !overflow, "flags not cleared by new window");
    for (int i = 0; i < 4; i++) send(1);
    fifo_wrfull = 1;
    send(0);
    check(overflow, "overflow not raised");
    fifo_wrfull = 0;
    send(0);                               // stopped after overflow
    check(writes == 20, $sformatf("writes=%0d expected 20", writes));
    check(exp_q.size() == 0, "missing writes");
    capture_en = 0; @(negedge clk); @(negedge clk);
    capture_en = 1; @(negedge clk); @(negedge clk);
    check(!overflow, "overflow not cleared");
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
