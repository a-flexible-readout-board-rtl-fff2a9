// Test of sync_ff: the output must follow the input after exactly STAGES
// destination clock edges and never change otherwise.
`timescale 1ns/1ps
module tb_sync_ff;
  logic clk = 0, rst_n = 0, d = 0, q;
  always #5 clk = ~clk;
  sync_ff #(.STAGES(3)) dut (.clk, .rst_n, .d, .q);

  int checks = 0, failures = 0;
  logic hist [$];

  initial begin
    #20000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2; i++) hist.push_back(1'b0);
    repeat (400) begin
      @(negedge clk) d = 1'($urandom_range(0, 1));
      @(posedge clk) #1;
      hist.push_back(d);
      // q now shows the value d had STAGES edges ago
      checks++;
      if (q !== hist[0]) begin failures++; $display("FAIL: q=%b expected %b", q, hist[0]); end
      void'(hist.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
