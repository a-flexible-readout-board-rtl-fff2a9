// Test of aurora_scrambler: the scrambler output is compared with a
// bit-serial model of G(x) = 1 + x^39 + x^58 kept here as a history of
// transmitted bits, and a descrambler instance fed with the scrambled
// blocks must return the original payloads one cycle later.
`timescale 1ns/1ps
module tb_aurora_scrambler;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  logic [63:0] din = 0, scr, dscr;
  aurora_scrambler #(.DESCRAMBLE(1'b0)) u_s (.clk, .rst_n, .en, .din, .dout(scr));
  aurora_scrambler #(.DESCRAMBLE(1'b1)) u_d (.clk, .rst_n, .en(en_d), .din(scr), .dout(dscr));
  logic en_d = 0;
  always @(posedge clk) en_d <= en;

  int checks = 0, failures = 0;
  bit hist [$];
  logic [63:0] sent [$];

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [63:0] model(input logic [63:0] x);
    logic [63:0] y;
    for (int k = 63; k >= 0; k--) begin
      int n = hist.size();
      y[k] = x[k] ^ hist[n-39] ^ hist[n-58];
      hist.push_back(y[k]);
    end
    return y;
  endfunction

  logic [63:0] expect_s;
  initial begin
    for (int i = 0; i < 58; i++) hist.push_back(1'b1);   // reset state
    #22 rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      din = {$urandom, $urandom}; en = 1;
      sent.push_back(din);
      expect_s = model(din);
      @(posedge clk) #1;
      checks++;
      if (scr !== expect_s) begin failures++; $display("FAIL: scrambled %h expected %h", scr, expect_s); end
      if (k > 0) begin
        checks++;
        if (dscr !== sent[0]) begin failures++; $display("FAIL: descrambled %h expected %h", dscr, sent[0]); end
        void'(sent.pop_front());
      end
      if (k % 7 == 3) begin @(negedge clk) en = 0; @(posedge clk); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
