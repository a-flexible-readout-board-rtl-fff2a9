// Test of the complete RD53A emulator. The serial command stream is produced
// by a ttc_encoder (tested on its own) and the four output lanes are
// descrambled and parsed here with an independent model of the framing:
// data blocks carry eight 32-bit words (all-ones filler ignored), a
// separator ends an event and may carry one last word, register blocks
// start with 0xD2 (requested read) or 0xB4 (automatic). Checked: the
// decoder locks; a written register is read back in a requested frame;
// every triggered bunch crossing gives one event whose header has the
// trigger tag, followed by exactly n_hits hit words with in-range columns
// and rows; automatic register frames appear about every n_frames data
// frames; the lanes stay strictly aligned; no bad frames and no drops;
// a block leaves on every lane exactly every 8 clocks.
`timescale 1ns/1ps
module tb_rd53a_emulator;
  import pilup_pkg::*;
  logic clk = 0, rst_n = 0;
  always #3.125 clk = ~clk;
  ttc_cmd_t cmd; logic cmd_valid = 0, cmd_ready, elink, frame_start, int_trig_sent;
  logic [7:0] n_hits = 8'd3, n_frames = 8'd4;
  logic [65:0] lanes [4]; logic lanes_valid, locked, reg_frame_sent, data_frame_sent;
  logic [15:0] trig_count, bad_frames, dropped;
  ttc_encoder u_enc (.clk, .rst_n, .cmd, .cmd_valid, .cmd_ready, .trig_period(16'd0),
    .elink, .frame_start, .int_trig_sent);
  rd53a_emulator dut (.clk, .rst_n, .elink, .n_hits, .n_frames, .lanes, .lanes_valid,
    .locked, .trig_count, .bad_frames, .dropped, .reg_frame_sent, .data_frame_sent);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #3ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- descrambler and block parser ----
  bit hist [4][$];
  logic [31:0] ev [$];
  logic [31:0] events [$][$];
  logic [63:0] req_frames [$];
  int n_auto = 0, n_data_frames = 0, n_blocks = 0;
  // block rate: one block per lane every 8 clocks (1.28 Gb/s of payload per
  // lane at 160 MHz)
  int since_blk = -1, bad_spacing = 0;
  always @(posedge clk) if (rst_n) begin
    if (lanes_valid) begin
      if (since_blk >= 0 && since_blk != 7) bad_spacing++;
      since_blk = 0;
    end else if (since_blk >= 0) since_blk++;
  end
  always @(posedge clk) if (rst_n && lanes_valid) begin
    logic [63:0] p [4];
    n_blocks++;
    for (int l = 0; l < 4; l++) begin
      for (int k = 63; k >= 0; k--) begin
        int n;
        n = hist[l].size();
        p[l][k] = lanes[l][k] ^ hist[l][n-39] ^ hist[l][n-58];
        hist[l].push_back(lanes[l][k]);
        if (hist[l].size() > 64) void'(hist[l].pop_front());
      end
    end
    check(lanes[0][65:64] == lanes[1][65:64] && lanes[0][65:64] == lanes[2][65:64] &&
          lanes[0][65:64] == lanes[3][65:64], "sync headers aligned on all lanes");
    if (lanes[0][65:64] == 2'b01) begin
      for (int i = 0; i < 8; i++) begin
        logic [31:0] w; w = (i % 2 == 0) ? p[i/2][63:32] : p[i/2][31:0];
        if (w != 32'hFFFF_FFFF) ev.push_back(w);
      end
    end else begin
      for (int l = 1; l < 4; l++) check(p[l][63:56] == 8'h78, "idle on lanes 1..3 in control blocks");
      case (p[0][63:56])
        8'h1E: begin
          if (p[0][55:48] == 8'h04) ev.push_back(p[0][31:0]);
          else check(p[0][55:48] == 8'h00, "separator octet count 0 or 4");
          events.push_back(ev); ev.delete(); n_data_frames++;
        end
        8'hD2: req_frames.push_back(p[0]);
        8'hB4: n_auto++;
        8'h78: ;
        default: check(0, $sformatf("unknown block type %h", p[0][63:56]));
      endcase
    end
  end

  task automatic send(input ttc_cmd_t c);
    @(posedge clk); cmd <= c; cmd_valid <= 1;
    do @(posedge clk); while (!cmd_ready);
    cmd_valid <= 0;
  endtask
  function automatic ttc_cmd_t mk(input cmd_kind_e k, input logic [3:0] pat, input logic [4:0] tag,
                                  input logic [8:0] a, input logic [15:0] d);
    ttc_cmd_t c; c = '0; c.kind = k; c.pattern = pat; c.tag = tag; c.chip_id = 4'd0;
    c.addr = a; c.data = d; return c;
  endfunction

  int exp_ev = 0, first, n_before;
  logic [4:0] exp_tags [$];
  initial begin
    for (int l = 0; l < 4; l++) repeat (58) hist[l].push_back(1'b1);
    cmd = '0;
    #40 rst_n = 1;
    repeat (40 * 16) @(posedge clk);
    check(locked, "decoder locked on Sync frames");
    // register write then requested read-back
    send(mk(C_WRREG, 0, 0, 9'h012, 16'hBEEF));
    send(mk(C_WRREG, 0, 0, 9'h1F0, 16'h0A5A));
    send(mk(C_RDREG, 0, 0, 9'h012, 0));
    send(mk(C_RDREG, 0, 0, 9'h1F0, 0));
    repeat (40 * 16) @(posedge clk);
    check(req_frames.size() == 2, $sformatf("%0d requested register frames", req_frames.size()));
    if (req_frames.size() == 2) begin
      check(req_frames[0][51:42] == 10'h012 && req_frames[0][41:26] == 16'hBEEF, "read-back of 0x012");
      check(req_frames[1][51:42] == 10'h1F0 && req_frames[1][41:26] == 16'h0A5A, "read-back of 0x1F0");
    end
    // triggers with different patterns and hit counts
    first = events.size();
    for (int t = 0; t < 24; t++) begin
      logic [3:0] pat; pat = 4'(t % 15 + 1);
      if (t == 12) begin n_hits = 8'd0; repeat (40 * 16) @(posedge clk); first = events.size(); exp_ev = 0; exp_tags.delete(); end
      if (t == 18) begin n_hits = 8'd9; repeat (40 * 16) @(posedge clk); first = events.size(); exp_ev = 0; exp_tags.delete(); end
      send(mk(C_TRIGGER, pat, 5'(t), 0, 0));
      for (int b = 0; b < 4; b++) if (pat[3-b]) begin exp_ev++; exp_tags.push_back(5'(t)); end
      repeat (16 * (t % 3)) @(posedge clk);
      if (t == 11 || t == 17 || t == 23) begin
        repeat (60 * 16) @(posedge clk);
        check(events.size() - first == exp_ev, $sformatf("%0d events, expected %0d", events.size() - first, exp_ev));
        for (int e = first; e < events.size(); e++) begin
          logic [31:0] h; h = events[e][0];
          check(events[e].size() == int'(n_hits) + 1, $sformatf("event size %0d, n_hits %0d", events[e].size(), n_hits));
          check(h[31:25] == 7'b0000001, "event header marker");
          if (e - first < exp_tags.size()) check(h[19:15] == exp_tags[e - first], "trigger tag in header");
          for (int i = 1; i < events[e].size(); i++)
            check(events[e][i][31:26] < 50 && events[e][i][25:17] < 192, "hit column and row in range");
        end
      end
    end
    check(n_auto > 0 && n_auto * 4 <= n_data_frames + 4 && (n_auto + 2) * 4 >= n_data_frames,
          $sformatf("%0d auto frames for %0d data frames", n_auto, n_data_frames));
    check(trig_count == 16'd24, "trigger commands counted");
    check(bad_spacing == 0 && n_blocks > 500, $sformatf("%0d blocks, %0d with spacing other than 8 clocks", n_blocks, bad_spacing));
    check(bad_frames == 0 && dropped == 0, "no bad frames, no dropped triggers");
    // ECR clears trigger id, BCR clears BCID
    send(mk(C_ECR, 0, 0, 0, 0)); send(mk(C_BCR, 0, 0, 0, 0));
    n_before = events.size();
    send(mk(C_TRIGGER, 4'b1000, 5'd3, 0, 0));
    repeat (60 * 16) @(posedge clk);
    check(events.size() == n_before + 1, "one event after ECR");
    if (events.size() == n_before + 1) begin
      check(events[n_before][0][24:20] == 5'd0, "trigger id restarts at 0 after ECR");
      check(events[n_before][0][14:0] < 15'd40, "BCID small after BCR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
