// Test of aurora_rx_decoder: cycles of four blocks are built here, scrambled
// with a bit-serial model of G(x) = 1 + x^39 + x^58 and presented every 8
// cycles. For each cycle the decoder's item list must equal the one worked
// out here: data words in lane order without filler, a Separator's word
// and an end item, nothing for Idle, two tagged words for a register
// block. A misaligned cycle and a bad sync header must be counted, items
// must appear two cycles after the strobe, and a flush must drop exactly the
// next cycle.
`timescale 1ns/1ps
module tb_aurora_rx_decoder;
  import pilup_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [65:0] lanes [4];
  logic lanes_valid = 0, flush = 0, items_valid;
  rx_item_t items [8];
  logic [3:0] n_items;
  logic [15:0] hdr_errors, align_errors;
  aurora_rx_decoder dut (.clk, .rst_n, .lanes, .lanes_valid, .flush, .items, .n_items,
    .items_valid, .hdr_errors, .align_errors);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #1ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit hist [4][$];
  function automatic logic [63:0] scr(input int l, input logic [63:0] x);
    logic [63:0] y;
    for (int k = 63; k >= 0; k--) begin
      int n = hist[l].size();
      y[k] = x[k] ^ hist[l][n-39] ^ hist[l][n-58];
      hist[l].push_back(y[k]);
      if (hist[l].size() > 64) void'(hist[l].pop_front());
    end
    return y;
  endfunction

  // expected item lists, as strings "D xxxxxxxx", "E", "R xxxxxxxx L"
  string exp_q [$][$];
  string cur [$];
  int n_lists = 0;

  always @(posedge clk) if (rst_n && items_valid) begin
    string s;
    check(exp_q.size() > 0, "unexpected item list");
    if (exp_q.size() > 0) begin
      check(int'(n_items) == exp_q[0].size(), $sformatf("list %0d: %0d items, expected %0d", n_lists, n_items, exp_q[0].size()));
      for (int i = 0; i < int'(n_items) && i < exp_q[0].size(); i++) begin
        if (items[i].is_end) s = "E";
        else begin
          s = $sformatf("%s %h", (items[i].w.ptype == PK_REG) ? "R" : "D", items[i].w.data);
          if (items[i].w.last) s = {s, " L"};
        end
        check(s == exp_q[0][i], $sformatf("list %0d item %0d: '%s' expected '%s'", n_lists, i, s, exp_q[0][i]));
      end
      void'(exp_q.pop_front());
    end
    n_lists++;
  end

  task automatic send(input logic [1:0] sh [4], input logic [63:0] p [4], input bit expect_list);
    @(posedge clk);
    for (int l = 0; l < 4; l++) lanes[l] <= {sh[l], scr(l, p[l])};
    lanes_valid <= 1;
    if (expect_list) exp_q.push_back(cur);
    cur.delete();
    @(posedge clk);
    lanes_valid <= 0;
    // items two cycles after the strobe
    @(posedge clk); #1;
    check(items_valid == expect_list, "item timing");
    repeat (5) @(posedge clk);
  endtask

  logic [1:0]  shd [4] = '{2'b01, 2'b01, 2'b01, 2'b01};
  logic [1:0]  shc [4] = '{2'b10, 2'b10, 2'b10, 2'b10};
  logic [63:0] idle = {8'h78, 56'd0};
  logic [63:0] p [4];
  initial begin
    for (int l = 0; l < 4; l++) repeat (58) hist[l].push_back(1'b1);
    #22 rst_n = 1;
    // full data cycle
    for (int l = 0; l < 4; l++) begin
      p[l] = {32'h1000_0000 + 32'(l), 32'h2000_0000 + 32'(l)};
      cur.push_back($sformatf("D %h", p[l][63:32])); cur.push_back($sformatf("D %h", p[l][31:0]));
    end
    send(shd, p, 1);
    // partial data cycle with filler
    p = '{{32'h0300_0001, 32'h0300_0002}, {32'h0300_0003, 32'hFFFF_FFFF}, {64'hFFFF_FFFF_FFFF_FFFF}, {64'hFFFF_FFFF_FFFF_FFFF}};
    cur = '{"D 03000001", "D 03000002", "D 03000003"};
    send(shd, p, 1);
    // separator with 0 octets
    p = '{{8'h1E, 8'h00, 48'd0}, idle, idle, idle};
    cur = '{"E"};
    send(shc, p, 1);
    // separator with 4 octets
    p = '{{8'h1E, 8'h04, 16'h0, 32'h0200_ABCD}, idle, idle, idle};
    cur = '{"D 0200abcd", "E"};
    send(shc, p, 1);
    // register frame
    p = '{{8'hB4, 56'h1_2345_6789_ABCD}, idle, idle, idle};
    cur = '{"R b4012345", "R 6789abcd L"};
    send(shc, p, 1);
    // all idle, separator-7
    p = '{idle, idle, idle, idle};
    send(shc, p, 1);
    p = '{{8'hE1, 56'd0}, idle, idle, idle};
    cur = '{"E"};
    send(shc, p, 1);
    check(align_errors == 0 && hdr_errors == 0, "no errors so far");
    // misaligned: lane 2 carries a command block in a data cycle
    p = '{64'h0400_0000_0400_0001, 64'h0400_0002_0400_0003, idle, 64'h0400_0004_0400_0005};
    cur = '{"D 04000000", "D 04000001", "D 04000002", "D 04000003", "D 04000004", "D 04000005"};
    send('{2'b01, 2'b01, 2'b10, 2'b01}, p, 1);
    check(align_errors == 1, "alignment error counted");
    // invalid sync header on lane 1
    p = '{idle, idle, idle, idle};
    send('{2'b10, 2'b00, 2'b10, 2'b10}, p, 1);
    check(hdr_errors == 1, "header error counted");
    // flush drops the next cycle only
    @(posedge clk) flush <= 1; @(posedge clk) flush <= 0;
    p = '{{8'h1E, 8'h00, 48'd0}, idle, idle, idle};
    send(shc, p, 0);
    cur = '{"E"};
    send(shc, p, 1);
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, "all lists received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
