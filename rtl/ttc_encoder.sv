// TTC encoder: commands from the GBT link -> RD53A serial command stream.
//
// The RD53A receives clock and commands on one serial e-link as a stream of
// 16-bit frames, sent MSB first, one bit per clock cycle of clk (160 Mb/s at
// a 160 MHz clock). At each frame boundary the encoder chooses the next
// frame by priority:
//   1. a Sync frame when SYNC_INTERVAL-1 frames have passed since the last
//      one and no multi-frame command is half sent;
//   2. the remaining frames of a multi-frame command (WrReg, RdReg);
//   3. a new command from cmd/cmd_valid (cmd_ready pulses when taken);
//   4. an internally generated trigger, when enabled;
//   5. a Noop frame.
// Triggers are one frame {trigger-pattern symbol, tag symbol}. WrReg is the
// WrReg header frame plus three frames of six 5-bit data symbols carrying
// {chip_id, 0, addr[8:0], data[15:0]}; RdReg is the header frame plus two
// frames carrying {chip_id, 0, addr[8:0], 6'b0}. ECR and BCR are one frame.
// The internal trigger generator sends one trigger every trig_period frames
// (0 = off) with pattern 0001 and a tag that counts up.
//
// From the board firmware: translating GBT commands into the RD53A
// protocol on the e-link, and generating triggers at a configurable rate.
// This design's choices: the command input as a decoded struct, the frame
// values and symbol tables (public RD53A protocol), the sync interval and
// the priority order.
`timescale 1ns/1ps
module ttc_encoder
  import pilup_pkg::*;
#(
  parameter int unsigned SYNC_INTERVAL = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ttc_cmd_t    cmd,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic [15:0] trig_period,   // frames between internal triggers, 0 = off
  output logic        elink,         // serial command bit
  output logic        frame_start,   // high with the first bit of each frame
  output logic        int_trig_sent  // pulse when an internal trigger frame starts
);
  logic [3:0]  bitcnt;
  logic [15:0] shreg;
  logic [15:0] queue [3];
  logic [1:0]  qlen;
  logic [7:0]  since_sync;
  logic [15:0] trig_cnt;
  logic        trig_pend;
  logic [4:0]  int_tag;
  logic        boundary;

  assign boundary = bitcnt == 4'd15;
  assign elink    = shreg[15];

  // frames of a command, first one in f[0]; n = number of frames
  function automatic void encode(input ttc_cmd_t c, output logic [15:0] f [4], output logic [2:0] n);
    logic [29:0] w;
    logic [19:0] r;
    f = '{default: CMD_NOOP};
    w = {c.chip_id, 1'b0, c.addr, c.data};
    r = {c.chip_id, 1'b0, c.addr, 6'b0};
    unique case (c.kind)
      C_TRIGGER: begin f[0] = {trig_symbol(c.pattern), data_symbol(c.tag)}; n = 3'd1; end
      C_ECR:     begin f[0] = CMD_ECR; n = 3'd1; end
      C_BCR:     begin f[0] = CMD_BCR; n = 3'd1; end
      C_WRREG:   begin
        f[0] = CMD_WRREG;
        f[1] = {data_symbol(w[29:25]), data_symbol(w[24:20])};
        f[2] = {data_symbol(w[19:15]), data_symbol(w[14:10])};
        f[3] = {data_symbol(w[9:5]),   data_symbol(w[4:0])};
        n = 3'd4;
      end
      C_RDREG:   begin
        f[0] = CMD_RDREG;
        f[1] = {data_symbol(r[19:15]), data_symbol(r[14:10])};
        f[2] = {data_symbol(r[9:5]),   data_symbol(r[4:0])};
        n = 3'd3;
      end
      default:   begin f[0] = CMD_NOOP; n = 3'd1; end
    endcase
  endfunction

  logic [15:0] enc_f [4];
  logic [2:0]  enc_n;
  always_comb encode(cmd, enc_f, enc_n);

  logic sync_due, take_cmd;
  assign sync_due  = since_sync >= 8'(SYNC_INTERVAL - 1) && qlen == 0;
  assign take_cmd  = boundary && !sync_due && qlen == 0 && cmd_valid;
  assign cmd_ready = take_cmd;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      bitcnt <= 4'd15; shreg <= CMD_SYNC; qlen <= '0; queue <= '{default: CMD_NOOP};
      since_sync <= 8'(SYNC_INTERVAL - 1); trig_cnt <= '0; trig_pend <= 1'b0; int_tag <= '0;
      frame_start <= 1'b0; int_trig_sent <= 1'b0;
    end else begin
      bitcnt        <= bitcnt + 1'b1;
      frame_start   <= boundary;
      int_trig_sent <= 1'b0;
      if (!boundary) begin
        shreg <= {shreg[14:0], 1'b0};
      end else begin
        // internal trigger generator counts frames
        if (trig_period != 0 && trig_cnt >= trig_period - 1) begin
          trig_cnt <= '0; trig_pend <= 1'b1;
        end else begin
          trig_cnt <= trig_cnt + 1'b1;
        end
        since_sync <= since_sync + 1'b1;
        if (sync_due) begin
          shreg <= CMD_SYNC; since_sync <= '0;
        end else if (qlen != 0) begin
          shreg <= queue[0]; queue[0] <= queue[1]; queue[1] <= queue[2]; qlen <= qlen - 1'b1;
        end else if (cmd_valid) begin
          shreg <= enc_f[0];
          queue <= '{enc_f[1], enc_f[2], enc_f[3]};
          qlen  <= 2'(enc_n - 3'd1);
        end else if (trig_pend) begin
          shreg         <= {trig_symbol(4'b0001), data_symbol(int_tag)};
          int_tag       <= int_tag + 1'b1;
          trig_pend     <= 1'b0;
          int_trig_sent <= 1'b1;
        end else begin
          shreg <= CMD_NOOP;
        end
      end
    end
endmodule
