// FULL mode framer: converter FIFO -> 32-bit words for the FULL mode link.
//
// A small state machine reads tagged packet words from the show-ahead FIFO
// and frames each packet as one FULL mode chunk:
//   SOP word      {24'h0, 0x3C}  tx_charisk = 0001 (K28.1)
//   header word   {30'h0, packet type}        (PK_DATA or PK_REG)
//   payload words the packet's words, up to the one marked last
//   EOP word      {busy, 3'b000, crc[19:0], 0xDC}, tx_charisk = 0001 (K28.6)
// The CRC-20 covers header and payload words. Whenever there is nothing to
// send, including a gap inside a packet while the FIFO is empty, the word is
// IDLE {24'h0, 0xBC} (K28.5). busy is the BUSY-ON/OFF flow-control bit
// forwarded in the EOP word. One word per clk cycle; at 240 MHz that is the
// 7.68 Gb/s payload of the 9.6 Gb/s 8b/10b line; the 8b/10b encoder itself
// is the transceiver's. Outputs are registered. K characters only ever sit
// in byte 0, so tx_charisk[3:1] are always 0; the port keeps the 4-bit
// width of a 32-bit transceiver interface.
// From the document: K characters, word layout of SOP/EOP/IDLE, the 20-bit
// CRC field and BUSY bit, and a state machine driven by the header attached
// to each packet. This design's choices: the header word in the chunk, the
// CRC polynomial 0xC1ACF with all-ones start value, idles inside a packet.
`timescale 1ns/1ps
module fullmode_tx
  import pilup_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  pkt_word_t   fifo_rdata,
  input  logic        fifo_empty,
  output logic        fifo_ren,
  input  logic        busy,
  output logic [31:0] tx_data,
  output logic [3:0]  tx_charisk,
  output logic [15:0] packets_sent
);
  typedef enum logic [1:0] { F_IDLE, F_HDR, F_DATA, F_EOP } fstate_e;

  fstate_e     st;
  logic [19:0] crc;
  pkt_type_e   ptype;
  logic [31:0] hdr;

  assign hdr      = {30'd0, ptype};
  assign fifo_ren = st == F_DATA && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= F_IDLE; crc <= FM_CRC_INIT; ptype <= PK_DATA;
      tx_data <= {24'd0, FM_IDLE}; tx_charisk <= 4'b0001; packets_sent <= '0;
    end else begin
      tx_data    <= {24'd0, FM_IDLE};
      tx_charisk <= 4'b0001;
      unique case (st)
        F_IDLE: if (!fifo_empty) begin
          tx_data <= {24'd0, FM_SOP};
          ptype   <= fifo_rdata.ptype;
          crc     <= FM_CRC_INIT;
          st      <= F_HDR;
        end
        F_HDR: begin
          tx_data <= hdr; tx_charisk <= 4'b0000;
          crc     <= crc20_word(crc, hdr);
          st      <= F_DATA;
        end
        F_DATA: if (!fifo_empty) begin
          tx_data <= fifo_rdata.data; tx_charisk <= 4'b0000;
          crc     <= crc20_word(crc, fifo_rdata.data);
          if (fifo_rdata.last) st <= F_EOP;
        end
        F_EOP: begin
          tx_data      <= {busy, 3'b000, crc, FM_EOP};
          packets_sent <= packets_sent + 1'b1;
          st           <= F_IDLE;
        end
        default: st <= F_IDLE;
      endcase
    end
endmodule
