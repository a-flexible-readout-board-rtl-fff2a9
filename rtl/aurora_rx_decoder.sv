// Aurora 64b/66b receive decoder of the protocol converter.
//
// Takes one 66-bit block per lane per lanes_valid strobe (block lock and
// lane deskew are done by the receiving SERDES), descrambles each payload
// and sorts the cycle's blocks, lane 0 first, into a list of up to
// 2*LANES items:
//   * data blocks (sync header 01): two words each, upper half first, with
//     the 0xFFFFFFFF filler words dropped;
//   * Separator (0x1E): its word if it carries 4 or more valid octets, then
//     an end-of-frame item; Separator-7 (0xE1): an end-of-frame item;
//   * Idle (0x78): nothing;
//   * any other code: an RD53A register frame, two words tagged PK_REG,
//     {code, status, addr_a, value_a[15:8]} then {value_a[7:0], addr_b,
//     value_b}, the second marked last.
// Sync headers other than 01/10 count in hdr_errors; a cycle whose lanes do
// not all carry the same block type breaks strict alignment and counts in
// align_errors. After flush (the lane source was switched) the next block
// cycle only re-synchronizes the descramblers and is discarded, since the
// self-synchronizing descrambler needs 58 bits of the new stream.
// items/n_items/items_valid are registered: they appear two
// cycles after the lanes_valid strobe (descrambler, then sorting).
// The block formats, strict alignment and the scrambler are Aurora
// 64b/66b; the word ordering and the tagging are this design's choices.
`timescale 1ns/1ps
module aurora_rx_decoder
  import pilup_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [65:0] lanes [LANES],
  input  logic        lanes_valid,
  input  logic        flush,        // discard the next block cycle (source changed)
  output rx_item_t    items [2*LANES],
  output logic [$clog2(2*LANES+1)-1:0] n_items,
  output logic        items_valid,
  output logic [15:0] hdr_errors,
  output logic [15:0] align_errors
);
  localparam int unsigned NI = 2 * LANES;

  logic [63:0] pay [LANES];
  logic [1:0]  sh  [LANES];
  logic        dvalid, skip, skip_d;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    aurora_scrambler #(.DESCRAMBLE(1'b1)) u_dscr (
      .clk, .rst_n, .en(lanes_valid), .din(lanes[l][63:0]), .dout(pay[l]));
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)           sh[l] <= AUR_SH_CTRL;
      else if (lanes_valid) sh[l] <= lanes[l][65:64];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dvalid <= 1'b0; skip <= 1'b0; skip_d <= 1'b0;
    end else begin
      dvalid <= lanes_valid;
      if (flush)            skip <= 1'b1;
      else if (lanes_valid) skip <= 1'b0;
      if (lanes_valid)      skip_d <= skip || flush;
    end

  // ---- sort one cycle of blocks ----
  rx_item_t lst [NI];
  int unsigned n;
  logic bad_hdr, misaligned;

  function automatic rx_item_t mk(input pkt_type_e t, input logic last, input logic [31:0] d, input logic e);
    rx_item_t r;
    r.is_end = e; r.w.ptype = t; r.w.last = last; r.w.data = d;
    return r;
  endfunction

  always_comb begin
    n = 0; bad_hdr = 1'b0; misaligned = 1'b0;
    for (int i = 0; i < NI; i++) lst[i] = mk(PK_DATA, 1'b0, 32'd0, 1'b0);
    for (int l = 0; l < LANES; l++) begin
      if (sh[l] != sh[0]) misaligned = 1'b1;
      if (sh[l] == AUR_SH_DATA) begin
        if (pay[l][63:32] != RD53_FILLER) begin lst[n] = mk(PK_DATA, 1'b0, pay[l][63:32], 1'b0); n++; end
        if (pay[l][31:0]  != RD53_FILLER) begin lst[n] = mk(PK_DATA, 1'b0, pay[l][31:0],  1'b0); n++; end
      end else if (sh[l] == AUR_SH_CTRL) begin
        unique case (pay[l][63:56])
          AUR_IDLE: ;
          AUR_SEP: begin
            if (pay[l][55:48] >= 8'd4) begin lst[n] = mk(PK_DATA, 1'b0, pay[l][31:0], 1'b0); n++; end
            lst[n] = mk(PK_DATA, 1'b0, 32'd0, 1'b1); n++;
          end
          AUR_SEP7: begin lst[n] = mk(PK_DATA, 1'b0, 32'd0, 1'b1); n++; end
          default: begin
            lst[n] = mk(PK_REG, 1'b0, pay[l][63:32], 1'b0); n++;
            lst[n] = mk(PK_REG, 1'b1, pay[l][31:0],  1'b0); n++;
          end
        endcase
      end else begin
        bad_hdr = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      items <= '{default: rx_item_t'('0)}; n_items <= '0; items_valid <= 1'b0;
      hdr_errors <= '0; align_errors <= '0;
    end else begin
      items_valid <= dvalid && !skip_d;
      if (dvalid && !skip_d) begin
        items   <= lst;
        n_items <= ($clog2(NI+1))'(n);
        if (bad_hdr)    hdr_errors   <= hdr_errors + 1'b1;
        if (misaligned) align_errors <= align_errors + 1'b1;
      end
    end
endmodule
