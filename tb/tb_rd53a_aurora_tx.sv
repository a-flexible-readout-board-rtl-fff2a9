// Test of rd53a_aurora_tx: events of 1 to 17 words are offered with random
// gaps, one block strobe every 8 cycles, a register frame every 3 data
// frames and one register read request. The four lanes are descrambled here
// with a bit-serial model and decoded independently: every cycle must have
// the same sync header on all lanes (strict alignment), the data words
// between Separators must reproduce each event exactly, one-word remainders
// must travel in a Separator with 4 valid octets, an automatic register
// frame must follow every third data frame and carry the register values
// of the addresses it names, and the requested register must come back in
// a frame with the request code.
`timescale 1ns/1ps
module tb_rd53a_aurora_tx;
  import pilup_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic blk_en = 0, word_last = 0, word_valid = 0, word_ready, rd_req = 0;
  logic [31:0] word = 0;
  logic [8:0] rd_req_addr = 0, reg_addr_a, reg_addr_b;
  logic [15:0] reg_val_a, reg_val_b;
  logic [65:0] lanes [4];
  logic lanes_valid, reg_frame_sent, data_frame_sent;
  logic [7:0] n_frames = 3;

  rd53a_aurora_tx dut (.clk, .rst_n, .blk_en, .word, .word_last, .word_valid, .word_ready,
    .n_frames, .rd_req, .rd_req_addr, .reg_addr_a, .reg_val_a, .reg_addr_b, .reg_val_b,
    .lanes, .lanes_valid, .reg_frame_sent, .data_frame_sent);

  function automatic logic [15:0] regval(input logic [8:0] a);
    return 16'hA000 ^ {a, 7'h55};
  endfunction
  assign reg_val_a = regval(reg_addr_a);
  assign reg_val_b = regval(reg_addr_b);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #3ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // block strobe every 8 cycles
  int div = 0;
  always @(posedge clk) begin div <= (div + 1) % 8; blk_en <= (div == 6); end

  // ---- descrambler model, one history per lane ----
  bit hist [4][$];
  function automatic logic [63:0] dscr(input int l, input logic [63:0] x);
    logic [63:0] y;
    for (int k = 63; k >= 0; k--) begin
      int n = hist[l].size();
      y[k] = x[k] ^ hist[l][n-39] ^ hist[l][n-58];
      hist[l].push_back(x[k]);
      if (hist[l].size() > 64) void'(hist[l].pop_front());
    end
    return y;
  endfunction

  // ---- stimulus: events ----
  logic [31:0] events [$][$];
  logic [31:0] cur [$];
  int lens [8] = '{1, 4, 8, 9, 2, 17, 1, 3};
  initial begin
    for (int e = 0; e < 24; e++) begin
      cur.delete();
      for (int i = 0; i < lens[e % 8]; i++) cur.push_back(i == 0 ? {7'b0000001, 25'(e)} : $urandom & 32'h7FFF_FFFF);
      events.push_back(cur);
    end
  end

  // ---- decode the output ----
  logic [31:0] got [$];
  int n_frames_got = 0, n_auto = 0, n_req = 0, frames_since_reg = 0, n_sep4 = 0;
  int ev_idx = 0;
  logic [8:0] exp_auto = 0;
  always @(posedge clk) if (rst_n && lanes_valid) begin
    logic [63:0] p [4];
    for (int l = 0; l < 4; l++) p[l] = dscr(l, lanes[l][63:0]);
    for (int l = 1; l < 4; l++) check(lanes[l][65:64] == lanes[0][65:64], "strict alignment");
    if (lanes[0][65:64] == 2'b01) begin
      for (int l = 0; l < 4; l++) begin
        if (p[l][63:32] != 32'hFFFF_FFFF) got.push_back(p[l][63:32]);
        if (p[l][31:0]  != 32'hFFFF_FFFF) got.push_back(p[l][31:0]);
      end
    end else begin
      check(lanes[0][65:64] == 2'b10, "sync header");
      for (int l = 1; l < 4; l++) check(p[l][63:56] == 8'h78, "lanes 1-3 idle in a command cycle");
      if (p[0][63:56] == 8'h1E) begin
        if (p[0][55:48] == 8'h04) begin got.push_back(p[0][31:0]); n_sep4++; end
        else check(p[0][55:48] == 8'h00, "separator octet count");
        check(ev_idx < events.size() && got == events[ev_idx], $sformatf("event %0d content (%0d words)", ev_idx, got.size()));
        got.delete(); ev_idx++; n_frames_got++; frames_since_reg++;
        check(frames_since_reg <= 3, "register frame after 3 data frames");
      end else if (p[0][63:56] == 8'hB4 || p[0][63:56] == 8'hD2) begin
        logic [9:0] a1, a2; logic [15:0] v1, v2;
        {a1, v1, a2, v2} = p[0][51:0];
        check(got.size() == 0, "register frame between data frames");
        check(v1 == regval(a1[8:0]) && v2 == regval(a2[8:0]), "register values");
        if (p[0][63:56] == 8'hB4) begin
          n_auto++;
          check(frames_since_reg == 3, $sformatf("auto frame after %0d data frames", frames_since_reg));
          check(a1[8:0] == exp_auto && a2[8:0] == exp_auto + 1, "auto register addresses");
          exp_auto += 2;
          frames_since_reg = 0;
        end else begin
          n_req++;
          check(a1 == 10'h17B, "requested register address");
          exp_auto += 1;
        end
      end else check(p[0][63:56] == 8'h78, $sformatf("unknown block %h", p[0]));
    end
  end

  initial begin
    for (int l = 0; l < 4; l++) repeat (58) hist[l].push_back(1'b1);
    #22 rst_n = 1;
    foreach (events[e]) begin
      foreach (events[e][i]) begin
        @(posedge clk);
        word <= events[e][i]; word_last <= (i == events[e].size() - 1); word_valid <= 1;
        do @(posedge clk); while (!word_ready);
        word_valid <= 0;
        repeat ($urandom_range(0, 3)) @(posedge clk);
      end
      if (e == 10) begin @(posedge clk); rd_req <= 1; rd_req_addr <= 9'h17B; @(posedge clk); rd_req <= 0; end
    end
    repeat (400) @(posedge clk);
    check(ev_idx == events.size(), $sformatf("%0d of %0d events received", ev_idx, events.size()));
    check(n_auto == 8, $sformatf("%0d automatic register frames", n_auto));
    check(n_req == 1, "one requested register frame");
    check(n_sep4 > 0, "one-word remainder in a separator");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
