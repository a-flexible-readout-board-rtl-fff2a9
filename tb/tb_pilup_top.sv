// End-to-end test of the readout firmware top level at its default sizes.
//
// Programs the AXI registers, sends commands as the GBT link would
// (register write, register read, triggers, ECR, BCR), lets the internal
// trigger generator run, then switches the converter to an external chip
// (a second emulator instance driven from elink_out) and raises BUSY.
// The FULL mode output is parsed word by word: every chunk must be
// SOP, header, payload, EOP with the right K flags and a CRC-20 computed
// here bit by bit; data packets must hold an event header plus the
// programmed number of hit words with in-range addresses; register packets
// must hold the value written. Each mechanism (internal and commanded
// triggers, automatic and requested register frames, one-word and longer
// frames, source switch, BUSY, status read-back) must be seen at least once.
// Finally the external lanes are flooded with a data cycle every two clocks
// and the overflow counter in STATUS2 must rise.
`timescale 1ns/1ps
module tb_pilup_top;
  import pilup_pkg::*;

  logic clk_axi = 0, clk_ttc = 0, clk_full = 0;
  logic rst_axi_n = 0, rst_ttc_n = 0, rst_full_n = 0;
  always #5     clk_axi  = ~clk_axi;
  always #3.125 clk_ttc  = ~clk_ttc;
  always #2.083 clk_full = ~clk_full;

  logic [11:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  ttc_cmd_t    gcmd;
  logic        gvalid, gready, elink_out, busy_in;
  logic [65:0] ext_lanes [AUR_LANES], chip_lanes [AUR_LANES];
  logic        ext_valid, chip_valid;
  // last phase: blocks twice as fast as the converter can take, to provoke overflow
  bit          flood = 0;
  logic        flood_valid = 0;
  always @(posedge clk_ttc) flood_valid <= flood && !flood_valid;
  always_comb begin
    for (int l = 0; l < AUR_LANES; l++)
      ext_lanes[l] = flood ? {2'b01, 64'h0123_4567_89AB_CDEF ^ 64'(l)} : chip_lanes[l];
    ext_valid = flood ? flood_valid : chip_valid;
  end
  logic [31:0] full_data;
  logic [3:0]  full_charisk;

  pilup_top dut (
    .clk_axi, .rst_axi_n, .clk_ttc, .rst_ttc_n, .clk_full, .rst_full_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .gbt_cmd(gcmd), .gbt_cmd_valid(gvalid), .gbt_cmd_ready(gready), .elink_out,
    .ext_lanes, .ext_lanes_valid(ext_valid), .busy_in, .full_data, .full_charisk);

  // external chip: another emulator on the command line, 2 hits per trigger
  logic ext_locked, ext_rf, ext_df;
  logic [15:0] ext_tc, ext_bf, ext_dr;
  rd53a_emulator u_ext (
    .clk(clk_ttc), .rst_n(rst_ttc_n), .elink(elink_out), .n_hits(8'd2), .n_frames(8'd0),
    .lanes(chip_lanes), .lanes_valid(chip_valid), .locked(ext_locked), .trig_count(ext_tc),
    .bad_frames(ext_bf), .dropped(ext_dr), .reg_frame_sent(ext_rf), .data_frame_sent(ext_df));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- AXI helpers ----------------
  task automatic axi_write(input logic [11:0] a, input logic [31:0] d);
    @(posedge clk_axi);
    awaddr <= a; wdata <= d; wstrb <= 4'hF; awvalid <= 1; wvalid <= 1;
    do @(posedge clk_axi); while (!awready);
    awvalid <= 0; wvalid <= 0;
    while (!bvalid) @(posedge clk_axi);
  endtask
  task automatic axi_read(input logic [11:0] a, output logic [31:0] d);
    @(posedge clk_axi);
    araddr <= a; arvalid <= 1;
    do @(posedge clk_axi); while (!arready);
    arvalid <= 0;
    while (!rvalid) @(posedge clk_axi);
    d = rdata;
  endtask

  task automatic gbt_send(input ttc_cmd_t c);
    @(posedge clk_ttc);
    gcmd <= c; gvalid <= 1;
    do @(posedge clk_ttc); while (!gready);
    gvalid <= 0;
  endtask

  // ---------------- FULL mode stream parser ----------------
  function automatic logic [19:0] ref_crc(input logic [19:0] c, input logic [31:0] d);
    logic fb;
    for (int i = 31; i >= 0; i--) begin
      fb = c[19] ^ d[i];
      c  = c << 1;
      if (fb) c = c ^ 20'hC1ACF;
    end
    return c;
  endfunction

  int n_data_pk = 0, n_reg_auto = 0, n_reg_req = 0, n_one_word = 0, n_long = 0;
  int n_busy_eop = 0, n_ext_pk = 0, n_pk = 0;
  int exp_hits = 3, prev_hits = 3;
  bit ext_mode = 0;
  bit saw_beef = 0;
  logic [31:0] pk [$];
  bit in_pk = 0;
  logic [19:0] crc;

  bit parse = 1;
  always @(posedge clk_full) if (rst_full_n && parse) begin
    if (full_charisk == 4'b0001 && full_data[7:0] == FM_SOP) begin
      check(!in_pk, "SOP inside a packet");
      in_pk = 1; pk.delete(); crc = 20'hFFFFF;
    end else if (full_charisk == 4'b0001 && full_data[7:0] == FM_EOP) begin
      check(in_pk, "EOP outside a packet");
      check(full_data[27:8] == crc, "CRC-20 of chunk");
      if (full_data[31]) n_busy_eop++;
      in_pk = 0; n_pk++;
      if (pk.size() >= 2 && pk[0] == 32'd0) begin        // data packet
        n_data_pk++;
        check(pk[1][31:25] == 7'b0000001, "event header marker");
        if (pk.size() == 2) n_one_word++; else n_long++;
        if (ext_mode) begin
          n_ext_pk++;
          check(pk.size() == 2 + 2, "external chip: header + 2 hits");
        end else
          check(pk.size() == 2 + exp_hits || pk.size() == 2 + prev_hits, $sformatf("header + %0d hits, got %0d words at %t hdr %h", exp_hits, pk.size()-2, $time, pk[1]));
        for (int i = 2; i < pk.size(); i++)
          check(pk[i][31:26] < 50 && pk[i][25:17] < 192, "hit address in range");
      end else if (pk.size() == 3 && pk[0] == 32'd1) begin // register packet
        if (pk[1][31:24] == RD53_REG_REQ) begin
          n_reg_req++;
          if (pk[1][19:10] == 10'd5 && {pk[1][9:0], pk[2][31:26]} == 16'hBEEF) saw_beef = 1;
        end else if (pk[1][31:24] == RD53_REG_AUTO) n_reg_auto++;
        else check(0, $sformatf("unknown register frame code %h %h at %t", pk[1], pk[2], $time));
      end else check(0, $sformatf("malformed packet of %0d words", pk.size()));
    end else if (full_charisk == 4'b0001) begin
      check(full_data[7:0] == FM_IDLE, "K word is IDLE");
    end else begin
      check(in_pk, "data word outside a packet");
      if (in_pk) begin pk.push_back(full_data); crc = ref_crc(crc, full_data); end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    #3ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ttc_cmd_t c;
  logic [31:0] rd;
  int pk_before;
  initial begin
    awaddr = 0; araddr = 0; awvalid = 0; wvalid = 0; arvalid = 0; wdata = 0; wstrb = 0;
    bready = 1; rready = 1; gvalid = 0; gcmd = '0; busy_in = 0;
    #100; rst_axi_n = 1; rst_ttc_n = 1; rst_full_n = 1;

    // 3 hits per trigger, register frame every 2 data frames, emulator on
    axi_write(12'h008, {16'd0, 8'd2, 8'd3});
    axi_write(12'h000, 32'd1);
    axi_read(12'h008, rd);
    check(rd == {16'd0, 8'd2, 8'd3}, "CTRL2 read back");
    repeat (2000) @(posedge clk_ttc);

    // register write and read back through commands
    c = '0; c.kind = C_WRREG; c.addr = 9'd5; c.data = 16'hBEEF; gbt_send(c);
    c = '0; c.kind = C_RDREG; c.addr = 9'd5; gbt_send(c);
    // commanded triggers
    c = '0; c.kind = C_TRIGGER; c.pattern = 4'b1010; c.tag = 5'd7; gbt_send(c);
    c = '0; c.kind = C_ECR; gbt_send(c);
    c = '0; c.kind = C_BCR; gbt_send(c);
    c = '0; c.kind = C_TRIGGER; c.pattern = 4'b0001; c.tag = 5'd9; gbt_send(c);
    repeat (3000) @(posedge clk_ttc);

    // internal trigger generator: every 20 frames
    axi_write(12'h004, 32'd20);
    repeat (8000) @(posedge clk_ttc);

    // one-word events
    axi_write(12'h008, {16'd0, 8'd2, 8'd0});
    exp_hits = 0;
    repeat (300) @(posedge clk_ttc);  // let old events drain
    prev_hits = 0;
    repeat (6000) @(posedge clk_ttc);

    // long events: 9 words = a full data cycle plus a one-word separator
    axi_write(12'h008, {16'd0, 8'd2, 8'd8});
    exp_hits = 8;
    repeat (300) @(posedge clk_ttc);
    prev_hits = 8;
    repeat (6000) @(posedge clk_ttc);

    // switch to the external chip and raise BUSY
    axi_write(12'h004, 32'd0);
    repeat (800) @(posedge clk_ttc);
    ext_mode = 1;
    axi_write(12'h000, 32'd0);
    busy_in = 1;
    repeat (100) @(posedge clk_ttc);
    c = '0; c.kind = C_TRIGGER; c.pattern = 4'b0110; c.tag = 5'd3; gbt_send(c);
    repeat (2000) @(posedge clk_ttc);

    // status read-back
    axi_read(12'h100, rd);
    check(rd[15:0] >= 16'd3 && rd[31:16] == 16'd0, $sformatf("STATUS0 triggers/bad frames %h", rd));
    axi_read(12'h104, rd);
    check(rd == 32'd0, "no Aurora errors");
    axi_read(12'h108, rd);
    check(rd == 32'd0, "no overflow or drop");
    axi_read(12'h10C, rd);
    check(rd[16] == 1'b1, "emulator locked");
    check(rd[15:0] == 16'(n_pk), $sformatf("packet count %0d vs %0d", rd[15:0], n_pk));
    check(rresp == 2'b00, "mapped read answers OKAY");
    axi_read(12'h110, rd);
    check(rd[31:16] >= 16'(n_reg_auto) && rd[15:0] > 16'd0,
          $sformatf("STATUS4 emulator frames: %0d register, %0d data", rd[31:16], rd[15:0]));
    axi_read(12'h114, rd);
    check(rd[31:16] > 16'd100 && rd[15:0] > 16'd0,
          $sformatf("STATUS5 %0d command frames, %0d internal triggers", rd[31:16], rd[15:0]));
    axi_read(12'h200, rd);
    check(rd == 32'd0 && rresp == 2'b10, "unmapped read answers SLVERR with 0");

    // every mechanism seen at least once
    check(n_data_pk > 0,  "data packets");
    check(n_reg_auto > 0, "automatic register frames");
    check(n_reg_req > 0,  "requested register frame");
    check(saw_beef,       "register write read back through a register frame");
    check(n_one_word > 0, "one-word frames (separator with data)");
    check(n_long > 0,     "multi-block frames");
    check(n_ext_pk == 2,  $sformatf("external chip events %0d", n_ext_pk));
    check(n_busy_eop > 0, "BUSY forwarded in EOP");
    check(!in_pk, "stream ends between packets");
    // overflow: the external lanes deliver a data cycle every 2 clocks
    parse = 0;
    flood = 1;
    repeat (400) @(posedge clk_ttc);
    flood = 0;
    repeat (400) @(posedge clk_ttc);
    axi_read(12'h108, rd);
    check(rd[15:0] > 16'd0, $sformatf("converter overflow counted (%0d)", rd[15:0]));
    $display("data=%0d auto=%0d req=%0d one=%0d long=%0d ext=%0d busy=%0d",
             n_data_pk, n_reg_auto, n_reg_req, n_one_word, n_long, n_ext_pk, n_busy_eop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
