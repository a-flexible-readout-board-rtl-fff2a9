// Test of fullmode_tx with a first-word-fall-through FIFO model. Packets of
// both types and several lengths are framed and checked word by word:
// IDLE K28.5 while there is nothing to send, SOP K28.1, a header holding the
// packet type, the payload, EOP K28.6 with the CRC-20 computed here bit by
// bit and the BUSY input in bit 31. With the FIFO preloaded, packets must
// follow each other with no gap, each taking its length plus 3 cycles;
// with gaps in the FIFO, IDLE words may appear inside a packet.
`timescale 1ns/1ps
module tb_fullmode_tx;
  import pilup_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  pkt_word_t fifo_rdata;
  logic fifo_empty, fifo_ren, busy = 0;
  logic [31:0] tx_data; logic [3:0] tx_charisk; logic [15:0] packets_sent;
  fullmode_tx dut (.clk, .rst_n, .fifo_rdata, .fifo_empty, .fifo_ren, .busy, .tx_data,
                   .tx_charisk, .packets_sent);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #1ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // FIFO model
  pkt_word_t q [$];
  bit hold_off = 0;
  assign fifo_empty = q.size() == 0 || hold_off;
  assign fifo_rdata = q.size() > 0 ? q[0] : '0;
  always @(posedge clk) if (fifo_ren && !fifo_empty) void'(q.pop_front());

  function automatic logic [19:0] ref_crc(input logic [19:0] c, input logic [31:0] d);
    for (int i = 31; i >= 0; i--) begin
      logic fb; fb = c[19] ^ d[i];
      c = c << 1;
      if (fb) c ^= 20'hC1ACF;
    end
    return c;
  endfunction

  // expected packets
  logic [31:0] exp_p [$][$];
  bit          exp_busy [$];
  task automatic add(input pkt_type_e t, input int n);
    logic [31:0] p [$];
    pkt_word_t w;
    p.push_back({30'd0, t});
    for (int i = 0; i < n; i++) begin
      w.ptype = t; w.last = (i == n - 1); w.data = $urandom;
      q.push_back(w); p.push_back(w.data);
    end
    exp_p.push_back(p);
  endtask

  // monitor
  logic [31:0] cur [$];
  bit in_pk = 0;
  int n_pk = 0, first_sop = -1, last_eop = -1, cyc = 0, n_idle_in = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tx_charisk == 4'b0001 && tx_data == {24'd0, 8'h3C}) begin
      check(!in_pk, "SOP inside packet"); in_pk = 1; cur.delete();
      if (first_sop < 0) first_sop = cyc;
    end else if (tx_charisk == 4'b0001 && tx_data[7:0] == 8'hDC) begin
      logic [19:0] c; c = 20'hFFFFF;
      foreach (cur[i]) c = ref_crc(c, cur[i]);
      check(in_pk, "EOP outside packet");
      check(tx_data[27:8] == c, "CRC-20");
      check(tx_data[30:28] == 3'b000, "reserved bits");
      check(exp_p.size() > 0 && cur == exp_p[0], $sformatf("packet %0d content", n_pk));
      check(exp_busy.size() > 0 && tx_data[31] == exp_busy[0], "BUSY bit");
      if (exp_p.size() > 0) void'(exp_p.pop_front());
      if (exp_busy.size() > 0) void'(exp_busy.pop_front());
      in_pk = 0; n_pk++; last_eop = cyc;
    end else if (tx_charisk == 4'b0001) begin
      check(tx_data == {24'd0, 8'hBC}, "IDLE word");
      if (in_pk) n_idle_in++;
    end else begin
      check(tx_charisk == 4'b0000, "data word K flags");
      check(in_pk, "data outside packet");
      cur.push_back(tx_data);
    end
  end

  int total;
  initial begin
    #22 rst_n = 1;
    repeat (5) @(posedge clk);
    check(tx_data == {24'd0, 8'hBC} && tx_charisk == 4'b0001, "IDLE when empty");
    // preloaded FIFO: back-to-back packets
    hold_off = 1;
    add(PK_DATA, 4); add(PK_REG, 2); add(PK_DATA, 1); add(PK_DATA, 9);
    repeat (4) exp_busy.push_back(0);
    total = (4+3) + (2+3) + (1+3) + (9+3);
    @(negedge clk) hold_off = 0;
    wait (n_pk == 4);
    check(last_eop - first_sop + 1 == total, $sformatf("%0d cycles for 4 packets, expected %0d", last_eop - first_sop + 1, total));
    // gaps inside a packet, BUSY raised
    busy = 1;
    add(PK_DATA, 6); exp_busy.push_back(1);
    for (int i = 0; i < 30; i++) begin @(negedge clk) hold_off = (i % 3 == 1); end
    hold_off = 0;
    repeat (20) @(posedge clk);
    check(n_pk == 5, "fifth packet");
    check(n_idle_in > 0, "IDLE inside a packet while the FIFO is empty");
    check(packets_sent == 16'd5, "packet counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
