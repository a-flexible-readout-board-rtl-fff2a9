// Test of protocol_converter across its two clock domains (Aurora side
// 160 MHz, FULL mode side 240 MHz). Events and register frames are turned
// into scrambled four-lane Aurora cycles here, with the same framing rules
// as the emulator, and presented once every 8 cycles. Every FULL mode packet
// must match: data packets are the header word 0 and the event's words,
// register packets the header word 1 and the two words of the register
// block; the CRC-20 is checked bit by bit. Finally cycles are presented
// every 4 cycles, faster than the serializer can drain them, and the
// overflow counter must rise. Also checked: flush drops exactly the next
// block cycle; the BUSY input appears in every EOP; the densest events
// (nine words in two block cycles) pass at the nominal rate without loss.
`timescale 1ns/1ps
module tb_protocol_converter;
  import pilup_pkg::*;
  logic clk_aur = 0, clk_full = 0, rst_aur_n = 0, rst_full_n = 0;
  always #3.125 clk_aur = ~clk_aur;
  always #2.083 clk_full = ~clk_full;
  logic [65:0] lanes [4];
  logic lanes_valid = 0, flush = 0, busy = 0;
  logic [31:0] tx_data; logic [3:0] tx_charisk;
  logic [15:0] hdr_errors, align_errors, overflows, packets_sent;
  protocol_converter dut (.clk_aur, .rst_aur_n, .lanes, .lanes_valid, .flush, .clk_full,
    .rst_full_n, .busy, .tx_data, .tx_charisk, .hdr_errors, .align_errors, .overflows, .packets_sent);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #2ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit hist [4][$];
  function automatic logic [63:0] scr(input int l, input logic [63:0] x);
    logic [63:0] y;
    for (int k = 63; k >= 0; k--) begin
      int n;
      n = hist[l].size();
      y[k] = x[k] ^ hist[l][n-39] ^ hist[l][n-58];
      hist[l].push_back(y[k]);
      if (hist[l].size() > 64) void'(hist[l].pop_front());
    end
    return y;
  endfunction

  int gap = 8;
  task automatic cycle(input logic [1:0] sh, input logic [63:0] p [4]);
    @(posedge clk_aur);
    for (int l = 0; l < 4; l++) lanes[l] <= {sh, scr(l, p[l])};
    lanes_valid <= 1;
    @(posedge clk_aur) lanes_valid <= 0;
    repeat (gap - 2) @(posedge clk_aur);
  endtask

  logic [63:0] IDLE = {8'h78, 56'd0};
  logic [31:0] exp_p [$][$];

  task automatic send_event(input logic [31:0] w [$]);
    logic [31:0] pk [$];
    logic [63:0] p [4];
    int i;
    pk = w; pk.push_front(32'd0); exp_p.push_back(pk);
    i = 0;
    while (w.size() - i >= 2 || (w.size() - i > 1)) begin
      for (int s = 0; s < 8; s++) begin
        logic [31:0] v; v = (i < w.size()) ? w[i] : 32'hFFFF_FFFF;
        if (i < w.size()) i++;
        if (s % 2 == 0) p[s/2][63:32] = v; else p[s/2][31:0] = v;
      end
      cycle(2'b01, p);
    end
    if (w.size() - i == 1) p = '{{8'h1E, 8'h04, 16'd0, w[i]}, IDLE, IDLE, IDLE};
    else                   p = '{{8'h1E, 8'h00, 48'd0}, IDLE, IDLE, IDLE};
    cycle(2'b10, p);
  endtask

  task automatic send_reg(input logic [63:0] blk);
    logic [63:0] p [4];
    exp_p.push_back('{32'd1, blk[63:32], blk[31:0]});
    p = '{blk, IDLE, IDLE, IDLE};
    cycle(2'b10, p);
  endtask

  // FULL mode monitor
  function automatic logic [19:0] ref_crc(input logic [19:0] c, input logic [31:0] d);
    for (int i = 31; i >= 0; i--) begin
      logic fb; fb = c[19] ^ d[i];
      c = c << 1;
      if (fb) c ^= 20'hC1ACF;
    end
    return c;
  endfunction
  logic [31:0] cur [$];
  bit in_pk = 0;
  int n_pk = 0, n_busy_eop = 0;
  always @(posedge clk_full) if (rst_full_n) begin
    if (tx_charisk == 4'b0001 && tx_data[7:0] == 8'h3C) begin in_pk = 1; cur.delete(); end
    else if (tx_charisk == 4'b0001 && tx_data[7:0] == 8'hDC) begin
      logic [19:0] c; c = 20'hFFFFF;
      foreach (cur[i]) c = ref_crc(c, cur[i]);
      check(tx_data[27:8] == c, "CRC-20");
      check(tx_data[31] == busy && tx_data[30:28] == 3'b000, "BUSY bit in EOP follows the busy input");
      if (busy) n_busy_eop++;
      if (gap < 8) ;  // overflow phase: packets are truncated by design
      else if (exp_p.size() > 0) begin
        check(cur == exp_p[0], $sformatf("packet %0d: %0d words, expected %0d", n_pk, cur.size(), exp_p[0].size()));
        void'(exp_p.pop_front());
      end else check(0, "unexpected packet");
      in_pk = 0; n_pk++;
    end else if (tx_charisk == 4'b0000 && in_pk) cur.push_back(tx_data);
  end

  logic [31:0] ev [$];
  int lens [6] = '{1, 2, 5, 8, 9, 16};
  initial begin
    for (int l = 0; l < 4; l++) repeat (58) hist[l].push_back(1'b1);
    #30 rst_aur_n = 1; rst_full_n = 1;
    for (int e = 0; e < 18; e++) begin
      ev.delete();
      for (int i = 0; i < lens[e % 6]; i++) ev.push_back(i == 0 ? {7'b0000001, 25'(e)} : $urandom & 32'h7FFF_FFFF);
      send_event(ev);
      if (e % 4 == 3) send_reg({8'hB4, 4'd0, 52'(e) * 52'h1234_5678_9});
      if (e % 5 == 0) begin logic [63:0] p [4]; p = '{IDLE, IDLE, IDLE, IDLE}; cycle(2'b10, p); end
    end
    repeat (200) @(posedge clk_aur);
    check(exp_p.size() == 0, $sformatf("%0d packets missing", exp_p.size()));
    check(n_pk == 22 && packets_sent == 16'd22, $sformatf("%0d packets", n_pk));
    check(overflows == 0 && hdr_errors == 0 && align_errors == 0, "no errors at nominal rate");
    // flush: the cycle after it is only used to resynchronise and is dropped
    @(posedge clk_aur) flush <= 1;
    @(posedge clk_aur) flush <= 0;
    begin
      logic [63:0] p [4];
      p = '{{8'hB4, 4'd0, 52'h1_2345_6789_ABCD}, IDLE, IDLE, IDLE};
      cycle(2'b10, p);                        // dropped: no packet expected
    end
    send_reg({8'hD2, 4'd0, 52'h0_0000_0000_0042});
    // densest events at the nominal block rate (9 words: one data cycle and
    // a separator carrying the ninth), with BUSY asserted throughout
    busy = 1;
    for (int e = 0; e < 40; e++) begin
      ev.delete();
      for (int i = 0; i < 9; i++) ev.push_back(32'h0200_0000 + 32'(e * 16 + i));
      send_event(ev);
    end
    repeat (300) @(posedge clk_aur);
    busy = 0;
    check(exp_p.size() == 0, $sformatf("%0d packets missing after flush and dense phase", exp_p.size()));
    check(n_pk == 63, $sformatf("%0d packets after the dense phase", n_pk));
    check(n_busy_eop == 41, $sformatf("%0d EOPs carried BUSY", n_busy_eop));
    check(overflows == 0, "densest events at the nominal rate do not overflow");
    // too fast: 8 words every 4 cycles
    gap = 4;
    exp_p.delete();
    for (int e = 0; e < 4; e++) begin
      ev.delete();
      for (int i = 0; i < 16; i++) ev.push_back(32'h0100_0000 + 32'(i));
      send_event(ev);
    end
    repeat (100) @(posedge clk_aur);
    check(overflows > 0, "overflow detected when blocks come too fast");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
