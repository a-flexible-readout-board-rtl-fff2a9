// RD53A front-end chip emulator.
//
// Stands in for an RD53A readout chip so that the rest of the readout chain
// can be exercised without the chip. It receives the serial command stream
// on elink (one bit per clk), decodes it (rd53a_cmd_decoder), records
// register writes in a 512 x 16-bit global register file without any effect
// on behaviour (the analog front end is not modelled), and for every
// triggered bunch crossing produces an event of a header and n_hits random
// hit words (rd53a_event_gen). Events wait in a FIFO and leave as Aurora
// 64b/66b blocks on four strictly aligned lanes (rd53a_aurora_tx), with one
// register frame after every n_frames data frames and one for each RdReg
// command. One block per lane is sent every BLOCK_DIV clk cycles; at a
// 160 MHz clk the default of 8 gives 20 Mblock/s per lane, the nearest whole
// divider to the chip's 1.28 Gb/s (19.4 Mblock/s).
// From the document: decode commands, record the configuration, random hits
// with a valid header, four lanes, N data frames per register frame. The
// divider, FIFO depth and register file read-out are this design's choices.
`timescale 1ns/1ps
module rd53a_emulator
  import pilup_pkg::*;
#(
  parameter logic [3:0]  CHIP_ID    = 4'd0,
  parameter int unsigned N_REGS     = 512,
  parameter int unsigned BLOCK_DIV  = 8,
  parameter int unsigned FIFO_LOG2  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        elink,
  input  logic [7:0]  n_hits,
  input  logic [7:0]  n_frames,
  output logic [65:0] lanes [AUR_LANES],
  output logic        lanes_valid,
  // monitoring
  output logic        locked,
  output logic [15:0] trig_count,
  output logic [15:0] bad_frames,
  output logic [15:0] dropped,
  output logic        reg_frame_sent,
  output logic        data_frame_sent
);
  // ---- command decoder ----
  logic       frame_tick, trig, ecr, bcr, wr, rd;
  logic [3:0] trig_pattern;
  logic [4:0] trig_tag;
  logic [8:0] wr_addr, rd_addr;
  logic [15:0] wr_data;

  rd53a_cmd_decoder #(.CHIP_ID(CHIP_ID)) u_dec (
    .clk, .rst_n, .elink, .locked, .frame_tick, .trig, .trig_pattern, .trig_tag,
    .ecr, .bcr, .wr, .wr_addr, .wr_data, .rd, .rd_addr, .bad_frames);

  // ---- global register file: written, read back, no other effect ----
  logic [15:0] regs [N_REGS];
  logic [8:0]  ra, rb;
  logic [15:0] va, vb;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) regs <= '{default: '0};
    else if (wr && 32'(wr_addr) < N_REGS) regs[wr_addr] <= wr_data;

  assign va = 32'(ra) < N_REGS ? regs[ra] : '0;
  assign vb = 32'(rb) < N_REGS ? regs[rb] : '0;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) trig_count <= '0;
    else if (trig) trig_count <= trig_count + 1'b1;

  // ---- events ----
  logic [31:0] ev_word;
  logic        ev_last, ev_valid, ev_ready;

  rd53a_event_gen u_gen (
    .clk, .rst_n, .frame_tick, .trig, .trig_pattern, .trig_tag, .ecr, .bcr, .n_hits,
    .word(ev_word), .word_last(ev_last), .word_valid(ev_valid), .word_ready(ev_ready),
    .dropped);

  logic        f_full, f_empty, f_ren;
  logic [32:0] f_rdata;

  logic [FIFO_LOG2:0] unused_f_count;    // fill level not needed
  sync_fifo #(.WIDTH(33), .DEPTH_LOG2(FIFO_LOG2)) u_fifo (
    .clk, .rst_n, .wen(ev_valid), .wdata({ev_last, ev_word}), .full(f_full),
    .ren(f_ren), .rdata(f_rdata), .empty(f_empty), .count(unused_f_count));
  assign ev_ready = !f_full;

  // ---- block strobe ----
  logic [$clog2(BLOCK_DIV)-1:0] div;
  logic blk_en;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) div <= '0;
    else        div <= (32'(div) == BLOCK_DIV - 1) ? '0 : div + 1'b1;
  assign blk_en = 32'(div) == BLOCK_DIV - 1;

  logic tx_ready;
  rd53a_aurora_tx #(.LANES(AUR_LANES)) u_tx (
    .clk, .rst_n, .blk_en, .word(f_rdata[31:0]), .word_last(f_rdata[32]),
    .word_valid(!f_empty), .word_ready(tx_ready), .n_frames,
    .rd_req(rd), .rd_req_addr(rd_addr),
    .reg_addr_a(ra), .reg_val_a(va), .reg_addr_b(rb), .reg_val_b(vb),
    .lanes, .lanes_valid, .reg_frame_sent, .data_frame_sent);
  assign f_ren = tx_ready;
endmodule
