// Test of async_fifo with a 16-word depth and unrelated clocks. Phase 1
// writes without reading: exactly 16 words must be accepted and full must
// rise. Phase 2 reads and writes at random: every word must come out once,
// in order and unchanged, and empty must be high at the end.
`timescale 1ns/1ps
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #3.5 wclk = ~wclk;
  always #5   rclk = ~rclk;
  logic wen = 0, ren = 0, full, empty;
  logic [34:0] wdata = 0, rdata;
  async_fifo #(.WIDTH(35), .DEPTH_LOG2(4)) dut (.wclk, .wrst_n, .wen, .wdata, .full,
    .rclk, .rrst_n, .ren, .rdata, .empty);

  int checks = 0, failures = 0, n_acc = 0, n_read = 0;
  logic [34:0] q [$];
  bit run_wr = 0, run_rd = 0;
  int to_write = 0;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge wclk) if (wrst_n) begin
    if (wen && !full) begin q.push_back(wdata); n_acc++; to_write--; end
    wen   <= run_wr && to_write > 0 && ($urandom_range(0, 2) != 0);
    wdata <= {3'($urandom), $urandom};
  end

  always @(posedge rclk) if (rrst_n) begin
    if (ren && !empty) begin
      check(q.size() != 0 && rdata === q[0], $sformatf("read %h", rdata));
      if (q.size() != 0) void'(q.pop_front());
      n_read++;
    end
    ren <= run_rd && ($urandom_range(0, 3) != 0);
  end

  initial begin
    #30 wrst_n = 1; rrst_n = 1;
    to_write = 30; run_wr = 1;
    repeat (200) @(posedge wclk);
    check(full, "full after filling");
    check(n_acc == 16, $sformatf("accepted %0d words, expected 16", n_acc));
    run_wr = 0; to_write = 0;
    to_write = 500; run_wr = 1; run_rd = 1;
    wait (to_write == 0);
    repeat (100) @(posedge rclk);
    check(empty, "empty after draining");
    check(n_read == n_acc && q.size() == 0, $sformatf("read %0d of %0d", n_read, n_acc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
