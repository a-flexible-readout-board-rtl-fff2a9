// RD53A emulator output: event words -> Aurora 64b/66b on four lanes.
//
// Between block strobes (blk_en, one 66-bit block per lane each strobe) the
// word stream is gathered into an eight-word buffer, which is one cycle of
// four 64-bit blocks. At each strobe all four lanes send the same block type
// (strict alignment); the first 32-bit word of a block is its upper half and
// lane 0 carries words 0-1, lane 1 words 2-3 and so on. One event is one
// data frame:
//   * full buffer, event not finished  -> data cycle (sync header 01);
//   * event finished, 2..8 words left  -> data cycle, unused words filled
//     with 0xFFFFFFFF, then a cycle with a Separator block (0x1E, 0 valid
//     octets) on lane 0 and Idle on lanes 1-3;
//   * event finished, 1 word left      -> Separator with 4 valid octets
//     carrying the word on lane 0, Idle on lanes 1-3;
//   * nothing to send                  -> Idle blocks (0x78) on all lanes.
// After every n_frames data frames (0 = never) and whenever a register read
// is pending, one register frame is sent between data frames: lane 0 holds
// {code, status[3:0], addr_a[9:0], value_a, addr_b[9:0], value_b} with code
// RD53_REG_REQ (first register is the requested one) or RD53_REG_AUTO (two
// registers from a rotating pointer); lanes 1-3 are Idle. Payloads are then
// scrambled per lane; lanes/lanes_valid are registered, one cycle after
// blk_en.
// From the document: the output format (N data frames, one register frame),
// the block layouts, strict alignment and the scrambler. This design's
// choices: the filler word, the frame split and the register frame codes.
`timescale 1ns/1ps
module rd53a_aurora_tx
  import pilup_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        blk_en,
  input  logic [31:0] word,
  input  logic        word_last,
  input  logic        word_valid,
  output logic        word_ready,
  input  logic [7:0]  n_frames,
  input  logic        rd_req,        // register read request (pulse)
  input  logic [8:0]  rd_req_addr,
  output logic [8:0]  reg_addr_a,    // register file read ports
  input  logic [15:0] reg_val_a,
  output logic [8:0]  reg_addr_b,
  input  logic [15:0] reg_val_b,
  output logic [65:0] lanes [LANES],
  output logic        lanes_valid,
  output logic        reg_frame_sent, // pulse per register frame
  output logic        data_frame_sent // pulse per finished data frame
);
  localparam int unsigned NW = 2 * LANES;

  logic [31:0] buf_w [NW];
  logic [$clog2(NW+1)-1:0] cnt;
  logic        has_last, sep_pending, rd_pending;
  logic [8:0]  rd_addr_q, auto_ptr;
  logic [7:0]  frames;

  logic reg_due;
  assign reg_due    = rd_pending || (n_frames != 0 && frames >= n_frames);
  // stop gathering the next event while a register frame waits for a gap
  assign word_ready = !blk_en && 32'(cnt) < NW && !has_last && !sep_pending
                      && !(reg_due && cnt == 0);

  assign reg_addr_a = rd_pending ? rd_addr_q : auto_ptr;
  assign reg_addr_b = rd_pending ? auto_ptr : auto_ptr + 9'd1;

  // ---- choose the blocks of this cycle ----
  logic [1:0]  sh;
  logic [63:0] pay [LANES];
  logic        send_reg, send_data, send_sep1, send_sep0, clear_buf;

  always_comb begin
    logic in_frame;
    in_frame  = cnt != 0 || sep_pending;
    send_reg  = !in_frame && reg_due;
    send_sep0 = sep_pending;
    send_sep1 = !send_reg && !sep_pending && has_last && cnt == 1;
    send_data = !send_reg && !sep_pending && (32'(cnt) == NW || (has_last && cnt > 1));
    clear_buf = send_sep1 || send_data;
    sh = AUR_SH_CTRL;
    for (int l = 0; l < LANES; l++) pay[l] = {AUR_IDLE, 56'd0};
    if (send_sep0) begin
      pay[0] = {AUR_SEP, 8'h00, 48'd0};
    end else if (send_reg) begin
      pay[0] = {rd_pending ? RD53_REG_REQ : RD53_REG_AUTO, 4'd0,
                1'b0, reg_addr_a, reg_val_a, 1'b0, reg_addr_b, reg_val_b};
    end else if (send_sep1) begin
      pay[0] = {AUR_SEP, 8'h04, 16'h0000, buf_w[0]};
    end else if (send_data) begin
      sh = AUR_SH_DATA;
      for (int l = 0; l < LANES; l++)
        pay[l] = {(2*l   < int'(cnt)) ? buf_w[2*l]   : RD53_FILLER,
                  (2*l+1 < int'(cnt)) ? buf_w[2*l+1] : RD53_FILLER};
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      buf_w <= '{default: '0}; cnt <= '0; has_last <= 1'b0; sep_pending <= 1'b0;
      rd_pending <= 1'b0; rd_addr_q <= '0; auto_ptr <= '0; frames <= '0;
      reg_frame_sent <= 1'b0; data_frame_sent <= 1'b0;
    end else begin
      reg_frame_sent <= 1'b0; data_frame_sent <= 1'b0;
      if (rd_req) begin rd_pending <= 1'b1; rd_addr_q <= rd_req_addr; end
      if (word_valid && word_ready) begin
        buf_w[cnt[$clog2(NW)-1:0]] <= word;
        cnt        <= cnt + 1'b1;
        has_last   <= word_last;
      end
      if (blk_en) begin
        if (send_reg) begin
          reg_frame_sent <= 1'b1;
          if (rd_pending) begin
            rd_pending <= rd_req;
            auto_ptr   <= auto_ptr + 9'd1;
          end else begin
            frames   <= '0;
            auto_ptr <= auto_ptr + 9'd2;
          end
        end
        if (send_sep0) begin
          sep_pending <= 1'b0;
        end
        if (clear_buf) begin
          cnt <= '0;
          if (has_last) begin
            has_last <= 1'b0;
            sep_pending <= send_data;
          end
        end
        if (send_sep0 || send_sep1) begin
          frames <= (frames == 8'hFF) ? frames : frames + 1'b1;
          data_frame_sent <= 1'b1;
        end
      end
    end

  // ---- per-lane scrambler; the sync header bypasses it ----
  logic [1:0] sh_q;
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [63:0] scr;
    aurora_scrambler #(.DESCRAMBLE(1'b0)) u_scr (
      .clk, .rst_n, .en(blk_en), .din(pay[l]), .dout(scr));
    assign lanes[l] = {sh_q, scr};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin sh_q <= AUR_SH_CTRL; lanes_valid <= 1'b0; end
    else begin
      lanes_valid <= blk_en;
      if (blk_en) sh_q <= sh;
    end
endmodule
