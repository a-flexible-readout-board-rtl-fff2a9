// Shared types and constants of the readout-board firmware.
//
// Holds the RD53A command encoding used between the TTC encoder and the
// RD53A emulator, the Aurora 64b/66b block codes, the FULL mode K
// characters, and the tagged word format that the protocol converter
// stores in its clock-crossing FIFO.
//
// Taken from the document: the Aurora sync headers (01 data, 10 command),
// the Separator (0x1E), Separator-7 (0xE1) and Idle (0x78) block codes, the
// FULL mode SOP 0x3C (K28.1), EOP 0xDC (K28.6) and IDLE 0xBC (K28.5)
// characters, and the RD53A event header / hit word layouts.
// Own choices: the RD53A 16-bit command frame values and the 8-bit symbol
// tables follow the public RD53A protocol as generally known; the register
// frame codes and the converter's tagged word format are this design's.
`timescale 1ns/1ps
package pilup_pkg;

  // ---------------- Aurora 64b/66b ----------------
  localparam logic [1:0] AUR_SH_DATA = 2'b01;
  localparam logic [1:0] AUR_SH_CTRL = 2'b10;
  localparam logic [7:0] AUR_SEP     = 8'h1E;
  localparam logic [7:0] AUR_SEP7    = 8'hE1;
  localparam logic [7:0] AUR_IDLE    = 8'h78;
  // RD53A register frame codes: read back on request / automatic read
  localparam logic [7:0] RD53_REG_REQ  = 8'hD2;
  localparam logic [7:0] RD53_REG_AUTO = 8'hB4;
  // filler for unused 32-bit slots of a partly filled data cycle
  localparam logic [31:0] RD53_FILLER  = 32'hFFFF_FFFF;
  localparam int unsigned AUR_LANES    = 4;

  // ---------------- FULL mode ----------------
  localparam logic [7:0] FM_SOP  = 8'h3C;
  localparam logic [7:0] FM_EOP  = 8'hDC;
  localparam logic [7:0] FM_IDLE = 8'hBC;
  localparam logic [19:0] FM_CRC_POLY = 20'hC1ACF;
  localparam logic [19:0] FM_CRC_INIT = 20'hFFFFF;

  // ---------------- RD53A commands ----------------
  localparam logic [15:0] CMD_SYNC  = 16'h817E;
  localparam logic [15:0] CMD_NOOP  = 16'h6969;
  localparam logic [15:0] CMD_ECR   = 16'h5A5A;
  localparam logic [15:0] CMD_BCR   = 16'h5959;
  localparam logic [15:0] CMD_RDREG = 16'h6565;
  localparam logic [15:0] CMD_WRREG = 16'h6666;

  typedef enum logic [2:0] {
    C_NONE, C_TRIGGER, C_ECR, C_BCR, C_RDREG, C_WRREG
  } cmd_kind_e;

  // A command as delivered by the GBT link to the TTC encoder
  typedef struct packed {
    cmd_kind_e   kind;
    logic [3:0]  pattern;  // trigger: which of the 4 bunch crossings
    logic [4:0]  tag;      // trigger tag
    logic [3:0]  chip_id;
    logic [8:0]  addr;
    logic [15:0] data;
  } ttc_cmd_t;

  // 4-bit trigger pattern (1..15) -> 8-bit symbol
  function automatic logic [7:0] trig_symbol(input logic [3:0] p);
    case (p)
      4'd1:  return 8'h2B;  4'd2:  return 8'h2D;  4'd3:  return 8'h2E;
      4'd4:  return 8'h33;  4'd5:  return 8'h35;  4'd6:  return 8'h36;
      4'd7:  return 8'h39;  4'd8:  return 8'h3A;  4'd9:  return 8'h3C;
      4'd10: return 8'h4B;  4'd11: return 8'h4D;  4'd12: return 8'h4E;
      4'd13: return 8'h53;  4'd14: return 8'h55;  4'd15: return 8'h56;
      default: return 8'h00;
    endcase
  endfunction

  // 5-bit value -> 8-bit balanced data symbol
  function automatic logic [7:0] data_symbol(input logic [4:0] v);
    logic [7:0] t [32] = '{8'h6A, 8'h6C, 8'h71, 8'h72, 8'h74, 8'h8B, 8'h8D, 8'h8E,
                           8'h93, 8'h95, 8'h96, 8'h99, 8'h9A, 8'h9C, 8'hA3, 8'hA5,
                           8'hA6, 8'hA9, 8'hAA, 8'hAC, 8'hB1, 8'hB2, 8'hB4, 8'hC3,
                           8'hC5, 8'hC6, 8'hC9, 8'hCA, 8'hCC, 8'hD1, 8'hD2, 8'hD4};
    return t[v];
  endfunction

  // inverse of trig_symbol; valid=0 when the symbol is not a trigger
  function automatic logic [4:0] trig_decode(input logic [7:0] s);
    for (int i = 1; i < 16; i++)
      if (trig_symbol(4'(i)) == s) return {1'b1, 4'(i)};
    return 5'd0;
  endfunction

  // inverse of data_symbol: {valid, value}
  function automatic logic [5:0] data_decode(input logic [7:0] s);
    for (int i = 0; i < 32; i++)
      if (data_symbol(5'(i)) == s) return {1'b1, 5'(i)};
    return 6'd0;
  endfunction

  // ---------------- converter FIFO word ----------------
  typedef enum logic [1:0] { PK_DATA = 2'd0, PK_REG = 2'd1 } pkt_type_e;

  typedef struct packed {
    pkt_type_e   ptype;
    logic        last;   // final word of a packet
    logic [31:0] data;
  } pkt_word_t;          // 35 bits

  // one item decoded from the Aurora stream: a word, or the end of a frame
  typedef struct packed {
    logic      is_end;
    pkt_word_t w;
  } rx_item_t;

  // 20-bit CRC of the FULL mode chunk, 32 bits at a time, MSB first
  function automatic logic [19:0] crc20_word(input logic [19:0] c, input logic [31:0] d);
    logic [19:0] r;
    r = c;
    for (int i = 31; i >= 0; i--)
      r = {r[18:0], 1'b0} ^ ((r[19] ^ d[i]) ? FM_CRC_POLY : 20'd0);
    return r;
  endfunction

endpackage
