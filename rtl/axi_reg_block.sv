// AXI4-Lite register block.
//
// Two arrays of 32-bit registers behind an AXI4-Lite slave: N_CTRL "CTRL"
// registers, read/write from the bus, whose contents drive the firmware, and
// N_STATUS "STATUS" registers, read-only from the bus, sampled from the
// status inputs on every clock cycle. The bus address maps directly onto a
// register: CTRL word i sits at byte address 4*i, STATUS word j at
// STATUS_BASE + 4*j; address bits [1:0] are ignored, so accesses are
// aligned to 4 bytes. A write updates only the bytes whose WSTRB bit is set.
//
// Timing: a write is accepted when both AWVALID and WVALID are high, the
// register is updated on that edge and BVALID rises on the next cycle. A
// read is accepted on ARVALID and RVALID rises on the next cycle with the
// data. One transaction per channel is outstanding at a time. Writes outside
// CTRL (including to STATUS) and reads outside CTRL and STATUS change
// nothing and answer SLVERR; such reads return 0.
// The CTRL/STATUS organisation, the direct address map, the 0x100 STATUS
// base and byte strobes follow the board firmware; the register counts and
// the handling of unmapped addresses are this design's choices.
`timescale 1ns/1ps
module axi_reg_block #(
  parameter int unsigned N_CTRL      = 64,
  parameter int unsigned N_STATUS    = 64,
  parameter int unsigned ADDR_W      = 12,
  parameter logic [11:0] STATUS_BASE = 12'h100
) (
  input  logic               clk,
  input  logic               rst_n,
  // write address / data / response
  input  logic [ADDR_W-1:0]  s_axi_awaddr,
  input  logic               s_axi_awvalid,
  output logic               s_axi_awready,
  input  logic [31:0]        s_axi_wdata,
  input  logic [3:0]         s_axi_wstrb,
  input  logic               s_axi_wvalid,
  output logic               s_axi_wready,
  output logic [1:0]         s_axi_bresp,
  output logic               s_axi_bvalid,
  input  logic               s_axi_bready,
  // read address / data
  input  logic [ADDR_W-1:0]  s_axi_araddr,
  input  logic               s_axi_arvalid,
  output logic               s_axi_arready,
  output logic [31:0]        s_axi_rdata,
  output logic [1:0]         s_axi_rresp,
  output logic               s_axi_rvalid,
  input  logic               s_axi_rready,
  // register contents
  output logic [31:0]        ctrl   [N_CTRL],
  input  logic [31:0]        status [N_STATUS]
);
  localparam int unsigned WA = ADDR_W - 2;   // word address width
  localparam int unsigned CW = (N_CTRL   > 1) ? $clog2(N_CTRL)   : 1;
  localparam int unsigned SW = (N_STATUS > 1) ? $clog2(N_STATUS) : 1;

  logic [31:0] status_q [N_STATUS];
  logic [WA-1:0] aw_word, ar_word, status_word;
  logic [WA-1:0] st_idx;
  logic wr_fire, rd_fire, aw_hit, ar_ctrl, ar_stat;
  logic unused_addr_lsbs;

  assign unused_addr_lsbs = ^{s_axi_awaddr[1:0], s_axi_araddr[1:0]};

  assign status_word = WA'(STATUS_BASE >> 2);
  assign aw_word = s_axi_awaddr[ADDR_W-1:2];
  assign ar_word = s_axi_araddr[ADDR_W-1:2];
  assign st_idx  = ar_word - status_word;
  assign aw_hit  = 32'(aw_word) < N_CTRL;
  assign ar_ctrl = 32'(ar_word) < N_CTRL;
  assign ar_stat = ar_word >= status_word && 32'(st_idx) < N_STATUS;

  // accept a write when address and data are both present and no response pends
  assign s_axi_awready = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_wready  = s_axi_awready;
  assign wr_fire       = s_axi_awready;
  assign s_axi_arready = !s_axi_rvalid;
  assign rd_fire       = s_axi_arvalid && s_axi_arready;

  // STATUS registers follow their inputs every cycle
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) status_q <= '{default: '0};
    else        status_q <= status;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ctrl         <= '{default: '0};
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= 2'b00;
    end else begin
      if (wr_fire) begin
        s_axi_bvalid <= 1'b1;
        s_axi_bresp  <= aw_hit ? 2'b00 : 2'b10;   // OKAY / SLVERR
        if (aw_hit)
          for (int b = 0; b < 4; b++)
            if (s_axi_wstrb[b]) ctrl[aw_word[CW-1:0]][8*b +: 8] <= s_axi_wdata[8*b +: 8];
      end else if (s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      s_axi_rresp  <= 2'b00;
    end else begin
      if (rd_fire) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rresp  <= (ar_ctrl || ar_stat) ? 2'b00 : 2'b10;
        if (ar_ctrl)
          s_axi_rdata <= ctrl[ar_word[CW-1:0]];
        else if (ar_stat)
          s_axi_rdata <= status_q[st_idx[SW-1:0]];
        else
          s_axi_rdata <= '0;
      end else if (s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end

  // AXI rule: a response stays valid until it is taken
  property p_hold(v, r);
    @(posedge clk) v && !r |=> v;
  endproperty
  a_bhold: assert property (p_hold(s_axi_bvalid, s_axi_bready));
  a_rhold: assert property (p_hold(s_axi_rvalid, s_axi_rready));
endmodule
