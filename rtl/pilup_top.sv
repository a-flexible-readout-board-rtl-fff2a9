// Readout-board Kintex firmware: FELIX <-> RD53A protocol converter with an
// RD53A emulator, controlled through an AXI4-Lite register block.
//
// Data path. Commands decoded from the GBT link (gbt_cmd) enter the TTC
// encoder, which also makes its own triggers at a programmable rate, and
// leave as the RD53A serial command stream on elink_out. The same stream
// drives the on-board RD53A emulator. The protocol converter takes four
// Aurora lanes, either from the emulator or from an external chip
// (ext_lanes), and sends their events and register frames as FULL mode
// packets on full_data/full_charisk.
//
// Control. The processor reaches the AXI4-Lite slave (s_axi_*) through the
// chip-to-chip bridge. CTRL and STATUS registers:
//   0x000 CTRL0   [0] source: 1 = emulator, 0 = external chip
//   0x004 CTRL1   [15:0] internal trigger period in command frames, 0 = off
//   0x008 CTRL2   [7:0] hits per trigger, [15:8] data frames per register frame
//   0x100 STATUS0 {bad command frames, triggers decoded}
//   0x104 STATUS1 {Aurora alignment errors, Aurora header errors}
//   0x108 STATUS2 {emulator triggers dropped, converter overflows}
//   0x10C STATUS3 {15'b0, emulator locked, FULL mode packets sent}
//   0x110 STATUS4 {emulator register frames sent, emulator data frames sent}
//   0x114 STATUS5 {command frames sent, internal triggers sent}
// All counters are 16 bits wide and wrap.
// The source bit crosses to clk_ttc through a three-stage flip-flop
// synchronizer; the multi-bit fields cross through handshake synchronizers
// in both directions.
//
// Clocks: clk_axi for the bus; clk_ttc for the e-link bit rate (160 MHz,
// one bit per cycle) and for the Aurora block side, with one block per lane
// at most every 8 cycles; clk_full for the FULL mode words (240 MHz). Each
// domain has its own active-low reset.
// The block structure, the register block, the synchronizer types and the
// clock rates follow the board firmware; the register map is this design's.
`timescale 1ns/1ps
module pilup_top
  import pilup_pkg::*;
#(
  parameter int unsigned N_CTRL   = 64,
  parameter int unsigned N_STATUS = 64
) (
  input  logic        clk_axi,
  input  logic        rst_axi_n,
  input  logic        clk_ttc,
  input  logic        rst_ttc_n,
  input  logic        clk_full,
  input  logic        rst_full_n,
  // AXI4-Lite slave
  input  logic [11:0] s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [11:0] s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // GBT side (commands) and RD53A side
  input  ttc_cmd_t    gbt_cmd,
  input  logic        gbt_cmd_valid,
  output logic        gbt_cmd_ready,
  output logic        elink_out,
  input  logic [65:0] ext_lanes [AUR_LANES],
  input  logic        ext_lanes_valid,
  // FULL mode side
  input  logic        busy_in,
  output logic [31:0] full_data,
  output logic [3:0]  full_charisk
);
  // ---------------- register block ----------------
  logic [31:0] ctrl   [N_CTRL];
  logic [31:0] status [N_STATUS];

  axi_reg_block #(.N_CTRL(N_CTRL), .N_STATUS(N_STATUS)) u_regs (
    .clk(clk_axi), .rst_n(rst_axi_n),
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready, .s_axi_wdata, .s_axi_wstrb,
    .s_axi_wvalid, .s_axi_wready, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready, .s_axi_rdata, .s_axi_rresp,
    .s_axi_rvalid, .s_axi_rready, .ctrl, .status);

  // ---------------- AXI -> TTC domain ----------------
  logic        use_emu;
  logic [31:0] cfg;
  logic        cfg_upd;
  logic [15:0] trig_period;
  logic [7:0]  n_hits, n_frames;

  sync_ff #(.STAGES(3)) u_mode_sync (.clk(clk_ttc), .rst_n(rst_ttc_n), .d(ctrl[0][0]), .q(use_emu));

  handshake_sync #(.WIDTH(32)) u_cfg_sync (
    .src_clk(clk_axi), .src_rst_n(rst_axi_n), .src_data({ctrl[1][15:0], ctrl[2][15:0]}),
    .dst_clk(clk_ttc), .dst_rst_n(rst_ttc_n), .dst_data(cfg), .dst_update(cfg_upd));

  assign trig_period = cfg[31:16];
  assign n_frames    = cfg[15:8];
  assign n_hits      = cfg[7:0];

  // ---------------- TTC encoder ----------------
  logic elink, frame_start, int_trig_sent;

  ttc_encoder u_ttc (
    .clk(clk_ttc), .rst_n(rst_ttc_n), .cmd(gbt_cmd), .cmd_valid(gbt_cmd_valid),
    .cmd_ready(gbt_cmd_ready), .trig_period, .elink, .frame_start, .int_trig_sent);

  assign elink_out = elink;

  // ---------------- RD53A emulator ----------------
  logic [65:0] emu_lanes [AUR_LANES];
  logic        emu_valid, emu_locked, reg_frame_sent, data_frame_sent;
  logic [15:0] trig_count, bad_frames, dropped;

  rd53a_emulator u_emu (
    .clk(clk_ttc), .rst_n(rst_ttc_n), .elink, .n_hits, .n_frames,
    .lanes(emu_lanes), .lanes_valid(emu_valid), .locked(emu_locked),
    .trig_count, .bad_frames, .dropped, .reg_frame_sent, .data_frame_sent);

  // ---------------- source select and protocol converter ----------------
  logic [65:0] conv_lanes [AUR_LANES];
  logic        conv_valid;
  logic [15:0] hdr_errors, align_errors, overflows, packets_sent;

  // a source change restarts the descrambler stream: drop one block cycle
  logic use_emu_d;
  always_ff @(posedge clk_ttc or negedge rst_ttc_n)
    if (!rst_ttc_n) use_emu_d <= 1'b0;
    else            use_emu_d <= use_emu;

  always_comb begin
    conv_lanes = use_emu ? emu_lanes : ext_lanes;
    conv_valid = use_emu ? emu_valid : ext_lanes_valid;
  end

  protocol_converter #(.LANES(AUR_LANES)) u_conv (
    .clk_aur(clk_ttc), .rst_aur_n(rst_ttc_n), .lanes(conv_lanes), .lanes_valid(conv_valid),
    .flush(use_emu != use_emu_d),
    .clk_full, .rst_full_n, .busy(busy_in), .tx_data(full_data), .tx_charisk(full_charisk),
    .hdr_errors, .align_errors, .overflows, .packets_sent);

  // ---------------- activity counters (TTC domain) ----------------
  logic [15:0] n_reg_frames, n_data_frames, n_cmd_frames, n_int_trigs;
  always_ff @(posedge clk_ttc or negedge rst_ttc_n)
    if (!rst_ttc_n) begin
      n_reg_frames <= '0; n_data_frames <= '0; n_cmd_frames <= '0; n_int_trigs <= '0;
    end else begin
      if (reg_frame_sent)  n_reg_frames  <= n_reg_frames  + 1'b1;
      if (data_frame_sent) n_data_frames <= n_data_frames + 1'b1;
      if (frame_start)     n_cmd_frames  <= n_cmd_frames  + 1'b1;
      if (int_trig_sent)   n_int_trigs   <= n_int_trigs   + 1'b1;
    end

  // ---------------- status back to the AXI domain ----------------
  logic [159:0] st_ttc;
  logic [15:0]  st_full;
  logic         st_ttc_upd, st_full_upd;
  logic         unused_upd;

  // the synchronized words are used as they stand; the update strobes are not needed
  assign unused_upd = ^{cfg_upd, st_ttc_upd, st_full_upd};

  handshake_sync #(.WIDTH(160)) u_st_sync (
    .src_clk(clk_ttc), .src_rst_n(rst_ttc_n),
    .src_data({bad_frames, trig_count, align_errors, hdr_errors, dropped, overflows,
               n_reg_frames, n_data_frames, n_cmd_frames, n_int_trigs}),
    .dst_clk(clk_axi), .dst_rst_n(rst_axi_n), .dst_data(st_ttc), .dst_update(st_ttc_upd));

  logic emu_locked_axi;
  sync_ff #(.STAGES(3)) u_lock_sync (.clk(clk_axi), .rst_n(rst_axi_n), .d(emu_locked), .q(emu_locked_axi));

  handshake_sync #(.WIDTH(16)) u_pk_sync (
    .src_clk(clk_full), .src_rst_n(rst_full_n), .src_data(packets_sent),
    .dst_clk(clk_axi), .dst_rst_n(rst_axi_n), .dst_data(st_full), .dst_update(st_full_upd));

  always_comb begin
    status    = '{default: '0};
    status[0] = st_ttc[159:128];
    status[1] = st_ttc[127:96];
    status[2] = st_ttc[95:64];
    status[3] = {15'd0, emu_locked_axi, st_full};
    status[4] = st_ttc[63:32];
    status[5] = st_ttc[31:0];
  end
endmodule
