// Test of axi_reg_block: CTRL registers written with byte strobes must read
// back with only the strobed bytes changed and appear on ctrl; STATUS
// registers at 0x100 must read the status inputs; writes to STATUS and
// accesses beyond the arrays must not disturb anything, read 0 and answer
// SLVERR, while mapped accesses answer OKAY. The write response must come
// one cycle after the write is accepted and the read data one cycle after
// the address.
`timescale 1ns/1ps
module tb_axi_reg_block;
  localparam int NC = 8, NS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [11:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 1;
  logic arvalid = 0, arready, rvalid, rready = 1;
  logic [31:0] wdata = 0, rdata;
  logic [3:0] wstrb = 0;
  logic [1:0] bresp, rresp;
  logic [31:0] ctrl [NC];
  logic [31:0] status [NS];

  axi_reg_block #(.N_CTRL(NC), .N_STATUS(NS)) dut (.clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .ctrl, .status);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input logic [11:0] a, input logic [31:0] d, input logic [3:0] s,
                  input logic [1:0] er = 2'b00);
    @(posedge clk);
    awaddr <= a; wdata <= d; wstrb <= s; awvalid <= 1; wvalid <= 1;
    do @(posedge clk); while (!(awready && wready));
    awvalid <= 0; wvalid <= 0;
    @(posedge clk);
    check(bvalid && bresp == er, "write response one cycle after accept, OKAY or SLVERR");
  endtask
  task automatic rd(input logic [11:0] a, output logic [31:0] d, input logic [1:0] er = 2'b00);
    @(posedge clk);
    araddr <= a; arvalid <= 1;
    do @(posedge clk); while (!arready);
    arvalid <= 0;
    @(posedge clk);
    check(rvalid && rresp == er, "read data one cycle after address, OKAY or SLVERR");
    d = rdata;
  endtask

  logic [31:0] model [NC];
  logic [31:0] v, d;
  logic [3:0]  s;
  initial begin
    for (int i = 0; i < NS; i++) status[i] = 32'h1000_0000 * (i + 1) + 32'h55;
    model = '{default: '0};
    #22 rst_n = 1;
    for (int k = 0; k < 60; k++) begin
      automatic int r = $urandom_range(0, NC-1);
      v = $urandom; s = 4'($urandom);
      wr(12'(4*r) | 12'($urandom_range(0, 3)), v, s);   // low address bits ignored
      for (int b = 0; b < 4; b++) if (s[b]) model[r][8*b +: 8] = v[8*b +: 8];
    end
    for (int i = 0; i < NC; i++) begin
      rd(12'(4*i), d);
      check(d == model[i], $sformatf("CTRL%0d read %h expected %h", i, d, model[i]));
      check(ctrl[i] == model[i], $sformatf("CTRL%0d output", i));
    end
    wr(12'h100, 32'hDEAD_BEEF, 4'hF, 2'b10);                 // STATUS is read-only
    for (int i = 0; i < NS; i++) begin
      rd(12'h100 + 12'(4*i), d);
      check(d == status[i], $sformatf("STATUS%0d read %h", i, d));
    end
    status[2] = 32'hCAFE_0002;
    repeat (2) @(posedge clk);
    rd(12'h108, d);
    check(d == 32'hCAFE_0002, "STATUS follows its input");
    rd(12'h040, d, 2'b10);
    check(d == 0, "unmapped address reads 0");
    wr(12'h040, 32'hFFFF_FFFF, 4'hF, 2'b10);
    for (int i = 0; i < NC; i++) check(ctrl[i] == model[i], "unmapped write leaves CTRL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
