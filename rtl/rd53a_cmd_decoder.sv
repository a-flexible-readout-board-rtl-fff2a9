// RD53A command decoder (front end of the RD53A emulator).
//
// Shifts in the serial e-link stream one bit per clock and looks for the
// 16-bit Sync frame; once found, the frame boundary is fixed there and every
// 16 bits a frame is decoded (a Sync seen at another bit position moves the
// boundary). A frame whose first byte is a trigger-pattern symbol and second
// byte a data symbol is a trigger: trig pulses with its 4-bit pattern and
// 5-bit tag. ECR and BCR frames pulse ecr and bcr. A WrReg header is followed
// by three frames (six 5-bit symbols) holding {chip_id, 0, addr, data}, a
// RdReg header by two frames holding {chip_id, 0, addr, 6'b0}; wr or rd
// pulses after the last frame if chip_id equals CHIP_ID or its bit 3 (the
// broadcast bit) is set. frame_tick pulses once per frame (four bunch
// crossings). A frame that is none of these while locked counts in
// bad_frames. Outputs are registered and appear the cycle after the last bit
// of the frame. The emulator decoding RD53A commands follows the board
// firmware; the encoding itself is the public RD53A protocol and matches
// ttc_encoder.
`timescale 1ns/1ps
module rd53a_cmd_decoder
  import pilup_pkg::*;
#(
  parameter logic [3:0] CHIP_ID = 4'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        elink,
  output logic        locked,
  output logic        frame_tick,
  output logic        trig,
  output logic [3:0]  trig_pattern,
  output logic [4:0]  trig_tag,
  output logic        ecr,
  output logic        bcr,
  output logic        wr,
  output logic [8:0]  wr_addr,
  output logic [15:0] wr_data,
  output logic        rd,
  output logic [8:0]  rd_addr,
  output logic [15:0] bad_frames
);
  typedef enum logic [1:0] { D_CMD, D_WR, D_RD } dstate_e;

  logic [15:0] sh, frame;
  logic [3:0]  bitcnt;
  dstate_e     st;
  logic [1:0]  nfr;          // payload frames collected so far
  logic [29:0] payload;

  assign frame = {sh[14:0], elink};

  logic unused_bits;
  assign unused_bits = ^{sh[15], payload[29:20]};

  logic [4:0] t_hi;
  logic [5:0] d_lo, d_hi;
  assign t_hi = trig_decode(frame[15:8]);
  assign d_hi = data_decode(frame[15:8]);
  assign d_lo = data_decode(frame[7:0]);

  logic [29:0] payload_nxt;
  assign payload_nxt = {payload[19:0], d_hi[4:0], d_lo[4:0]};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sh <= '0; bitcnt <= '0; locked <= 1'b0; st <= D_CMD; nfr <= '0; payload <= '0;
      frame_tick <= 1'b0; trig <= 1'b0; trig_pattern <= '0; trig_tag <= '0;
      ecr <= 1'b0; bcr <= 1'b0; wr <= 1'b0; wr_addr <= '0; wr_data <= '0;
      rd <= 1'b0; rd_addr <= '0; bad_frames <= '0;
    end else begin
      sh <= frame;
      bitcnt <= bitcnt + 1'b1;
      {frame_tick, trig, ecr, bcr, wr, rd} <= '0;
      if (frame == CMD_SYNC && (!locked || bitcnt != 4'd15)) begin
        // (re)align on a Sync frame
        locked <= 1'b1; bitcnt <= '0; st <= D_CMD; frame_tick <= 1'b1;
      end else if (locked && bitcnt == 4'd15) begin
        frame_tick <= 1'b1;
        unique case (st)
          D_CMD: begin
            if (frame == CMD_SYNC || frame == CMD_NOOP) begin
              // nothing to do
            end else if (frame == CMD_ECR) ecr <= 1'b1;
            else if (frame == CMD_BCR) bcr <= 1'b1;
            else if (frame == CMD_WRREG) begin st <= D_WR; nfr <= '0; end
            else if (frame == CMD_RDREG) begin st <= D_RD; nfr <= '0; end
            else if (t_hi[4] && d_lo[5]) begin
              trig <= 1'b1; trig_pattern <= t_hi[3:0]; trig_tag <= d_lo[4:0];
            end else bad_frames <= bad_frames + 1'b1;
          end
          D_WR, D_RD: begin
            if (!(d_hi[5] && d_lo[5])) begin
              bad_frames <= bad_frames + 1'b1; st <= D_CMD;
            end else begin
              payload <= payload_nxt;
              nfr     <= nfr + 1'b1;
              if (st == D_WR && nfr == 2'd2) begin
                st <= D_CMD;
                if (payload_nxt[29:26] == CHIP_ID || payload_nxt[29]) begin
                  wr <= 1'b1; wr_addr <= payload_nxt[24:16]; wr_data <= payload_nxt[15:0];
                end
              end else if (st == D_RD && nfr == 2'd1) begin
                st <= D_CMD;
                if (payload_nxt[19:16] == CHIP_ID || payload_nxt[19]) begin
                  rd <= 1'b1; rd_addr <= payload_nxt[14:6];
                end
              end
            end
          end
          default: st <= D_CMD;
        endcase
      end
    end
endmodule
