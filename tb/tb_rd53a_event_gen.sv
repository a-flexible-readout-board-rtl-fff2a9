// Test of rd53a_event_gen: triggers with several patterns arrive together
// with the frame tick, as from the command decoder, while the output is
// randomly stalled. Every event must carry the header worked out here (trigger ID counting
// triggered crossings, tag, BCID = 4 per frame plus the crossing position,
// both counters cleared by ECR / BCR) followed by n_hits words equal to an
// independent model of the LFSR seeded from the header, with last on the
// final word.
`timescale 1ns/1ps
module tb_rd53a_event_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic frame_tick = 0, trig = 0, ecr = 0, bcr = 0, word_last, word_valid, word_ready = 0;
  logic [3:0] trig_pattern = 0; logic [4:0] trig_tag = 0;
  logic [7:0] n_hits = 3;
  logic [31:0] word; logic [15:0] dropped;
  rd53a_event_gen dut (.clk, .rst_n, .frame_tick, .trig, .trig_pattern, .trig_tag, .ecr, .bcr,
    .n_hits, .word, .word_last, .word_valid, .word_ready, .dropped);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #2ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] step(input logic [31:0] s);
    logic [31:0] n;
    n = s >> 1;
    if (s[0]) n = n ^ 32'h8020_0003;
    return n;
  endfunction

  logic [31:0] exp_w [$];
  logic        exp_l [$];
  int m_bcid = 0, m_tid = 0;

  task automatic add_event(input logic [31:0] hdr, input int nh);
    logic [31:0] l;
    exp_w.push_back(hdr); exp_l.push_back(nh == 0);
    l = step(hdr ^ 32'hA5C3_5A3C);
    for (int i = 0; i < nh; i++) begin
      exp_w.push_back({6'(l[31:26] % 50), 9'(l[25:17] % 192), l[16:0]});
      exp_l.push_back(i == nh - 1);
      l = step(l);
    end
  endtask

  // one frame: 16 cycles, tick (and maybe a command) on the last one
  task automatic frame(input bit t, input logic [3:0] p, input logic [4:0] tg, input bit e, input bit b);
    repeat (15) @(posedge clk);
    frame_tick <= 1; trig <= t; trig_pattern <= p; trig_tag <= tg; ecr <= e; bcr <= b;
    if (b) m_bcid = 0;
    if (e) m_tid = 0;
    if (t) for (int k = 0; k < 4; k++) if (p[3-k]) begin
      add_event({7'b0000001, 5'(m_tid), tg, 15'(m_bcid + k)}, int'(n_hits));
      m_tid++;
    end
    if (!b) m_bcid += 4;
    @(posedge clk);
    frame_tick <= 0; trig <= 0; ecr <= 0; bcr <= 0;
  endtask

  int n_words = 0;
  always @(posedge clk) if (rst_n) begin
    if (word_valid && word_ready) begin
      check(exp_w.size() > 0, "unexpected word");
      if (exp_w.size() > 0) begin
        check(word == exp_w[0], $sformatf("word %0d: %h expected %h", n_words, word, exp_w[0]));
        check(word_last == exp_l[0], $sformatf("last flag of word %0d", n_words));
        void'(exp_w.pop_front()); void'(exp_l.pop_front());
      end
      n_words++;
    end
    word_ready <= $urandom_range(0, 4) != 0;
  end

  initial begin
    #22 rst_n = 1;
    frame(0, 0, 0, 0, 0);
    frame(1, 4'b1000, 5'd3, 0, 0);
    frame(0, 0, 0, 0, 0);
    frame(1, 4'b0101, 5'd30, 0, 0);
    frame(1, 4'b1111, 5'd7, 0, 0);
    frame(0, 0, 0, 1, 0);      // ECR
    frame(0, 0, 0, 0, 1);      // BCR
    frame(1, 4'b0010, 5'd12, 0, 0);
    repeat (6) frame(0, 0, 0, 0, 0);
    n_hits = 0;
    frame(1, 4'b0001, 5'd1, 0, 0);
    repeat (6) frame(0, 0, 0, 0, 0);
    n_hits = 9;
    frame(1, 4'b1001, 5'd2, 0, 0);
    repeat (20) frame(0, 0, 0, 0, 0);
    check(exp_w.size() == 0, $sformatf("%0d words missing", exp_w.size()));
    check(dropped == 0, "no trigger dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
