// Test of ttc_encoder: the serial stream is cut into 16-bit frames at
// frame_start and checked against frames worked out here from the RD53A
// symbol tables: the first frame and then every 32nd is Sync when idle,
// idle frames are Noop, WrReg / RdReg / trigger / ECR / BCR commands give
// their exact frame sequences, and the internal generator sends one
// pattern-0001 trigger per programmed period with tags counting up. The
// stream runs at one bit per clock, so frames start exactly 16 clocks apart.
`timescale 1ns/1ps
module tb_ttc_encoder;
  import pilup_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ttc_cmd_t cmd;
  logic cmd_valid = 0, cmd_ready, elink, frame_start, int_trig_sent;
  logic [15:0] trig_period = 0;
  ttc_encoder dut (.clk, .rst_n, .cmd, .cmd_valid, .cmd_ready, .trig_period, .elink,
                   .frame_start, .int_trig_sent);

  localparam logic [7:0] DS [32] = '{8'h6A, 8'h6C, 8'h71, 8'h72, 8'h74, 8'h8B, 8'h8D, 8'h8E,
    8'h93, 8'h95, 8'h96, 8'h99, 8'h9A, 8'h9C, 8'hA3, 8'hA5, 8'hA6, 8'hA9, 8'hAA, 8'hAC,
    8'hB1, 8'hB2, 8'hB4, 8'hC3, 8'hC5, 8'hC6, 8'hC9, 8'hCA, 8'hCC, 8'hD1, 8'hD2, 8'hD4};
  localparam logic [7:0] TS [16] = '{8'h00, 8'h2B, 8'h2D, 8'h2E, 8'h33, 8'h35, 8'h36, 8'h39,
    8'h3A, 8'h3C, 8'h4B, 8'h4D, 8'h4E, 8'h53, 8'h55, 8'h56};

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // frame capture
  logic [15:0] frames [$];
  logic [15:0] sh; int nb = -1;
  always @(posedge clk) if (rst_n) begin
    if (frame_start) begin sh = {15'd0, elink}; nb = 1; end
    else if (nb >= 0) begin sh = {sh[14:0], elink}; nb++; end
    if (nb == 16) begin frames.push_back(sh); nb = 0; end
  end
  // one bit per clock: frame_start exactly every 16 clocks
  int since_fs = -1, bad_fs = 0, n_fs = 0;
  always @(posedge clk) if (rst_n) begin
    if (frame_start) begin
      if (since_fs >= 0 && since_fs != 15) bad_fs++;
      since_fs = 0; n_fs++;
    end else if (since_fs >= 0) since_fs++;
  end

  task automatic send(input ttc_cmd_t c);
    @(posedge clk); cmd <= c; cmd_valid <= 1;
    do @(posedge clk); while (!cmd_ready);
    cmd_valid <= 0;
  endtask

  ttc_cmd_t c;
  int start, n_sync, last_sync, n_trig;
  logic [29:0] w; logic [19:0] r;
  logic [15:0] exp_f [$];
  initial begin
    cmd = '0;
    #22 rst_n = 1;
    wait (frames.size() == 70);
    check(frames[0] == 16'h817E, "first frame is Sync");
    n_sync = 0; last_sync = 0;
    for (int i = 1; i < 70; i++) begin
      if (frames[i] == 16'h817E) begin
        check(i - last_sync == 32, $sformatf("Sync spacing %0d", i - last_sync));
        last_sync = i; n_sync++;
      end else check(frames[i] == 16'h6969, "idle frame is Noop");
    end
    check(n_sync == 2, "two more Sync frames in 70");

    // commands, sent back to back
    start = frames.size();
    c = '0; c.kind = C_WRREG; c.chip_id = 4'd3; c.addr = 9'h1A5; c.data = 16'h1234; send(c);
    c = '0; c.kind = C_RDREG; c.chip_id = 4'd3; c.addr = 9'h0F0; send(c);
    c = '0; c.kind = C_TRIGGER; c.pattern = 4'd5; c.tag = 5'd17; send(c);
    c = '0; c.kind = C_ECR; send(c);
    c = '0; c.kind = C_BCR; send(c);
    repeat (40 * 16) @(posedge clk);
    w = {4'd3, 1'b0, 9'h1A5, 16'h1234};
    r = {4'd3, 1'b0, 9'h0F0, 6'd0};
    exp_f = '{16'h6666, {DS[w[29:25]], DS[w[24:20]]}, {DS[w[19:15]], DS[w[14:10]]}, {DS[w[9:5]], DS[w[4:0]]},
              16'h6565, {DS[r[19:15]], DS[r[14:10]]}, {DS[r[9:5]], DS[r[4:0]]},
              {TS[5], DS[17]}, 16'h5A5A, 16'h5959};
    begin
      int j; j = 0;
      for (int i = start; i < frames.size() && j < exp_f.size(); i++) begin
        if (frames[i] == 16'h6969 && j == 0) continue;   // before the first command
        if (frames[i] == 16'h817E) continue;             // Sync may come between commands
        check(frames[i] == exp_f[j], $sformatf("command frame %0d: %h expected %h", j, frames[i], exp_f[j]));
        j++;
      end
      check(j == exp_f.size(), "all command frames seen");
    end

    // internal triggers every 10 frames for 320 frames
    start = frames.size();
    trig_period = 16'd10;
    repeat (320 * 16) @(posedge clk);
    trig_period = 16'd0;
    repeat (3 * 16) @(posedge clk);
    n_trig = 0;
    for (int i = start; i < frames.size(); i++)
      if (frames[i][15:8] == TS[1]) begin
        check(frames[i][7:0] == DS[n_trig % 32], $sformatf("internal trigger tag %0d", n_trig));
        n_trig++;
      end
    check(n_trig >= 31 && n_trig <= 33, $sformatf("%0d internal triggers in 320 frames", n_trig));
    check(bad_fs == 0 && n_fs > 100, $sformatf("%0d frames, %0d not 16 clocks apart", n_fs, bad_fs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
