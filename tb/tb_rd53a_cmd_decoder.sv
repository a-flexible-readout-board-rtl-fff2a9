// Test of rd53a_cmd_decoder: a serial stream built here from the RD53A
// symbol tables, starting with a few bits of noise so that the decoder has
// to find the Sync frame, must give exactly the expected trigger, ECR, BCR,
// register-write and register-read pulses with their fields; a command for
// another chip ID must be ignored and a broadcast one accepted; an invalid
// frame must count as a bad frame. A sweep then sends every trigger
// pattern and register writes whose payloads use all 32 data symbols.
`timescale 1ns/1ps
module tb_rd53a_cmd_decoder;
  import pilup_pkg::*;
  logic clk = 0, rst_n = 0, elink = 0;
  always #5 clk = ~clk;
  logic locked, frame_tick, trig, ecr, bcr, wr, rd;
  logic [3:0] trig_pattern; logic [4:0] trig_tag;
  logic [8:0] wr_addr, rd_addr; logic [15:0] wr_data, bad_frames;
  rd53a_cmd_decoder #(.CHIP_ID(4'd2)) dut (.clk, .rst_n, .elink, .locked, .frame_tick, .trig,
    .trig_pattern, .trig_tag, .ecr, .bcr, .wr, .wr_addr, .wr_data, .rd, .rd_addr, .bad_frames);

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
    #5ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // record decoder events
  string ev [$];
  int n_ticks = 0;
  always @(posedge clk) if (rst_n) begin
    if (frame_tick) n_ticks++;
    if (trig) ev.push_back($sformatf("T %0d %0d", trig_pattern, trig_tag));
    if (ecr)  ev.push_back("ECR");
    if (bcr)  ev.push_back("BCR");
    if (wr)   ev.push_back($sformatf("W %h %h", wr_addr, wr_data));
    if (rd)   ev.push_back($sformatf("R %h", rd_addr));
  end

  task automatic send_frame(input logic [15:0] f);
    for (int i = 15; i >= 0; i--) begin @(negedge clk) elink = f[i]; end
  endtask
  task automatic send_wr(input logic [3:0] id, input logic [8:0] a, input logic [15:0] d);
    logic [29:0] w; w = {id, 1'b0, a, d};
    send_frame(16'h6666);
    send_frame({DS[w[29:25]], DS[w[24:20]]});
    send_frame({DS[w[19:15]], DS[w[14:10]]});
    send_frame({DS[w[9:5]], DS[w[4:0]]});
  endtask
  task automatic send_rd(input logic [3:0] id, input logic [8:0] a);
    logic [19:0] r; r = {id, 1'b0, a, 6'd0};
    send_frame(16'h6565);
    send_frame({DS[r[19:15]], DS[r[14:10]]});
    send_frame({DS[r[9:5]], DS[r[4:0]]});
  endtask

  string exp_ev [$];
  initial begin
    #22 rst_n = 1;
    repeat (5) begin @(negedge clk) elink = 1; end   // misaligned start
    send_frame(16'h6969);
    check(!locked, "not locked before Sync");
    send_frame(16'h817E);
    send_frame(16'h6969);
    check(locked, "locked after Sync");
    send_frame({TS[9], DS[21]});
    send_frame(16'h5A5A);
    send_frame(16'h5959);
    send_wr(4'd2, 9'h123, 16'hBEEF);
    send_wr(4'd5, 9'h0AA, 16'h1111);          // other chip: ignored
    send_wr(4'd9, 9'h0AB, 16'h2222);          // broadcast
    send_rd(4'd2, 9'h1FF);
    send_frame(16'h1234);                     // not a command
    send_frame({TS[15], DS[0]});
    send_frame(16'h6969);
    send_frame(16'h6969);
    send_frame(16'h6969);   // keeps the stream going while the last pulses appear
    exp_ev = '{"T 9 21", "ECR", "BCR", "W 123 beef", "W 0ab 2222", "R 1ff", "T 15 0"};
    check(ev.size() == exp_ev.size(), $sformatf("%0d commands decoded", ev.size()));
    foreach (exp_ev[i]) if (i < ev.size()) check(ev[i] == exp_ev[i], $sformatf("'%s' expected '%s'", ev[i], exp_ev[i]));
    check(bad_frames == 16'd1, $sformatf("bad frames %0d", bad_frames));
    check(n_ticks == 24, $sformatf("frame ticks %0d", n_ticks));
    // every trigger pattern and every tag; register writes whose payloads
    // use all 32 data symbols; reads at scattered addresses
    ev.delete(); exp_ev.delete();
    for (int p = 1; p < 16; p++) begin
      send_frame({TS[p], DS[(p * 7 + 3) % 32]});
      exp_ev.push_back($sformatf("T %0d %0d", p, (p * 7 + 3) % 32));
    end
    for (int k = 0; k < 32; k++) begin
      logic [8:0] a; logic [15:0] d;
      a = 9'(k * 37 + 5); d = {5'(k), 5'(31 - k), 5'(k + 11), 1'(k)};
      send_wr(4'd2, a, d);
      exp_ev.push_back($sformatf("W %h %h", a, d));
      if (k % 4 == 0) begin send_rd(4'd10, a); exp_ev.push_back($sformatf("R %h", a)); end
    end
    send_frame(16'h6969);
    repeat (4) @(posedge clk);
    check(ev.size() == exp_ev.size(), $sformatf("%0d commands decoded in the sweep, expected %0d", ev.size(), exp_ev.size()));
    foreach (exp_ev[i]) if (i < ev.size()) check(ev[i] == exp_ev[i], $sformatf("'%s' expected '%s'", ev[i], exp_ev[i]));
    check(bad_frames == 16'd1, "no bad frames in the sweep");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
