// Test of handshake_sync: words written on the source side at random times
// must appear unchanged on the destination side within a bounded number of
// cycles, each reception is flagged by dst_update, and the destination
// never shows a word the source did not hold.
`timescale 1ns/1ps
module tb_handshake_sync;
  logic sclk = 0, dclk = 0, srst_n = 0, drst_n = 0;
  always #3.5 sclk = ~sclk;
  always #5   dclk = ~dclk;
  logic [31:0] src_data = 0, dst_data;
  logic dst_update;
  handshake_sync #(.WIDTH(32)) dut (.src_clk(sclk), .src_rst_n(srst_n), .src_data,
    .dst_clk(dclk), .dst_rst_n(drst_n), .dst_data, .dst_update);

  int checks = 0, failures = 0, updates = 0;
  logic [31:0] seen [$];

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge dclk) if (dst_update) begin
    updates++;
    checks++;
    if (!(dst_data inside {seen})) begin failures++; $display("FAIL: unknown word %h", dst_data); end
  end

  initial begin
    seen.push_back(0);
    #30 srst_n = 1; drst_n = 1;
    for (int k = 0; k < 40; k++) begin
      @(posedge sclk) src_data <= $urandom;
      @(posedge sclk) seen.push_back(src_data);
      // the word must arrive within 40 destination cycles
      begin
        int waited;
        waited = 0;
        while (dst_data !== src_data && waited < 40) begin @(posedge dclk); waited++; end
        checks++;
        if (dst_data !== src_data) begin failures++; $display("FAIL: %h not received", src_data); end
        else if (waited < 3) begin failures++; $display("FAIL: arrived too early (%0d)", waited); end
      end
      repeat ($urandom_range(0, 30)) @(posedge dclk);
    end
    checks++;
    if (updates < 40) begin failures++; $display("FAIL: only %0d updates", updates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
