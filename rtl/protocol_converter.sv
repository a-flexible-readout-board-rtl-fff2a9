// Aurora-to-FULL-mode protocol converter.
//
// Joins the four Aurora lanes of an RD53A (or of the emulator) into one
// FULL mode stream towards the FELIX card. In the Aurora clock domain
// (clk_aur) aurora_rx_decoder turns each cycle of blocks into a list of
// items; a serializer writes them one per cycle into a dual-clock FIFO as
// tagged words {type, last, data}. Data words are held back by one so that
// the end-of-frame item can mark the final word of an event as last;
// register frames go straight in. In the FULL mode domain (clk_full)
// fullmode_tx reads the FIFO and frames each packet with SOP/EOP.
// Timing: one item leaves the serializer per clk_aur cycle, so a new list
// must not arrive before the previous one is written (a block strobe at most
// every 2*LANES cycles); otherwise, or when the FIFO is full, words are lost
// and counted in overflows. Decoder, tagging header, dual-clock FIFO and
// FULL mode state machine follow the board firmware; the hold-back
// serializer and FIFO depth are this design's choices.
`timescale 1ns/1ps
module protocol_converter
  import pilup_pkg::*;
#(
  parameter int unsigned LANES           = 4,
  parameter int unsigned FIFO_DEPTH_LOG2 = 9
) (
  input  logic        clk_aur,
  input  logic        rst_aur_n,
  input  logic [65:0] lanes [LANES],
  input  logic        lanes_valid,
  input  logic        flush,        // lane source changed: drop one block cycle
  input  logic        clk_full,
  input  logic        rst_full_n,
  input  logic        busy,
  output logic [31:0] tx_data,
  output logic [3:0]  tx_charisk,
  // monitoring
  output logic [15:0] hdr_errors,
  output logic [15:0] align_errors,
  output logic [15:0] overflows,
  output logic [15:0] packets_sent
);
  localparam int unsigned NI = 2 * LANES;

  rx_item_t items [NI];
  logic [$clog2(NI+1)-1:0] n_items;
  logic items_valid;

  aurora_rx_decoder #(.LANES(LANES)) u_dec (
    .clk(clk_aur), .rst_n(rst_aur_n), .lanes, .lanes_valid, .flush,
    .items, .n_items, .items_valid, .hdr_errors, .align_errors);

  // ---- serializer ----
  rx_item_t  arr [NI];
  logic [$clog2(NI+1)-1:0] n, idx;
  pkt_word_t hold;
  logic      hold_valid;
  logic      fw_en, fw_full;
  pkt_word_t fw_data;
  logic      emit;
  rx_item_t  cur;

  assign emit = idx < n;
  assign cur  = arr[idx[$clog2(NI)-1:0]];

  always_comb begin
    fw_en = 1'b0; fw_data = hold;
    if (emit) begin
      if (cur.is_end) begin
        fw_en = hold_valid; fw_data = hold; fw_data.last = 1'b1;
      end else if (cur.w.ptype == PK_REG) begin
        fw_en = 1'b1; fw_data = cur.w;
      end else begin
        fw_en = hold_valid; fw_data = hold;
      end
    end
  end

  always_ff @(posedge clk_aur or negedge rst_aur_n)
    if (!rst_aur_n) begin
      arr <= '{default: rx_item_t'('0)}; n <= '0; idx <= '0; hold <= '0; hold_valid <= 1'b0;
      overflows <= '0;
    end else begin
      if (emit) begin
        idx <= idx + 1'b1;
        if (cur.is_end)                  hold_valid <= 1'b0;
        else if (cur.w.ptype == PK_DATA) begin hold <= cur.w; hold_valid <= 1'b1; end
      end
      if (items_valid) begin
        arr <= items; n <= n_items; idx <= '0;
        if (idx + (emit ? 1 : 0) < n) overflows <= overflows + 1'b1;
      end
      if (fw_en && fw_full) overflows <= overflows + 1'b1;
    end

  // ---- clock-domain crossing ----
  pkt_word_t fr_data;
  logic      fr_empty, fr_ren;

  async_fifo #(.WIDTH($bits(pkt_word_t)), .DEPTH_LOG2(FIFO_DEPTH_LOG2)) u_fifo (
    .wclk(clk_aur), .wrst_n(rst_aur_n), .wen(fw_en), .wdata(fw_data), .full(fw_full),
    .rclk(clk_full), .rrst_n(rst_full_n), .ren(fr_ren), .rdata(fr_data), .empty(fr_empty));

  fullmode_tx u_fm (
    .clk(clk_full), .rst_n(rst_full_n), .fifo_rdata(fr_data), .fifo_empty(fr_empty),
    .fifo_ren(fr_ren), .busy, .tx_data, .tx_charisk, .packets_sent);
endmodule
