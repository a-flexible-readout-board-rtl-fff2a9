// RD53A emulator event generator.
//
// Keeps the bunch-crossing counter (BCID, +4 per command frame since a frame
// spans four crossings; cleared by BCR) and the trigger counter (trigger ID,
// +1 per triggered crossing; cleared by ECR). A trigger command names up to
// four crossings in its pattern (bit 3 = first crossing of the frame); each
// named crossing is queued and becomes one event:
//   header  {7'b0000001, trig_id[4:0], tag[4:0], bcid[14:0]}
//   n_hits  hit words {core_col[5:0], row[8:0], side, 4 x ToT[3:0]}
// The hit words come from a 32-bit Galois LFSR (x^32+x^22+x^2+x+1) that is
// seeded for every event from its header, so each event differs while the
// generator stays cheap; core column and row are folded into the RD53A
// ranges (50 core columns, 192 rows). Words leave on a valid/ready stream
// with last marking the final word of an event; one word per cycle while
// ready is high. If more than 2**QUEUE_LOG2 crossings are waiting, further
// triggers are dropped and counted.
// From the board firmware: header with valid trigger data, a configurable
// number of random hits, LFSR seeded from trigger information. This
// design's choices: polynomial, seed, range folding, queue depth.
`timescale 1ns/1ps
module rd53a_event_gen #(
  parameter int unsigned QUEUE_LOG2 = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_tick,
  input  logic        trig,
  input  logic [3:0]  trig_pattern,
  input  logic [4:0]  trig_tag,
  input  logic        ecr,
  input  logic        bcr,
  input  logic [7:0]  n_hits,
  output logic [31:0] word,
  output logic        word_last,
  output logic        word_valid,
  input  logic        word_ready,
  output logic [15:0] dropped
);
  localparam logic [31:0] LFSR_TAPS = 32'h8020_0003;  // x^32+x^22+x^2+x+1

  logic [14:0] bcid;
  logic [4:0]  trig_id;
  logic [3:0]  pend_pat;
  logic [4:0]  pend_tag;
  logic [14:0] pend_bcid;
  logic [1:0]  pend_pos;

  // ---- queue of triggered crossings: {trig_id, tag, bcid} ----
  logic        q_wen, q_full, q_empty, q_ren;
  logic [24:0] q_wdata, q_rdata;

  logic [QUEUE_LOG2:0] unused_q_count;   // fill level not needed
  sync_fifo #(.WIDTH(25), .DEPTH_LOG2(QUEUE_LOG2)) u_q (
    .clk, .rst_n, .wen(q_wen), .wdata(q_wdata), .full(q_full),
    .ren(q_ren), .rdata(q_rdata), .empty(q_empty), .count(unused_q_count));

  // a new trigger is expanded one pattern bit per cycle
  assign q_wen   = pend_pat[3];
  assign q_wdata = {trig_id, pend_tag, pend_bcid + 15'(pend_pos)};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      bcid <= '0; trig_id <= '0; pend_pat <= '0; pend_tag <= '0; pend_bcid <= '0;
      pend_pos <= '0; dropped <= '0;
    end else begin
      if (bcr)             bcid <= '0;
      else if (frame_tick) bcid <= bcid + 15'd4;
      if (trig) begin
        pend_pat <= trig_pattern; pend_tag <= trig_tag; pend_bcid <= bcid; pend_pos <= '0;
      end else if (pend_pat != 0) begin
        pend_pat <= {pend_pat[2:0], 1'b0};
        pend_pos <= pend_pos + 1'b1;
      end
      if (ecr) trig_id <= '0;
      else if (q_wen) begin
        trig_id <= trig_id + 1'b1;
        if (q_full) dropped <= dropped + 1'b1;
      end
    end

  // ---- event output FSM ----
  typedef enum logic { E_IDLE, E_HITS } estate_e;
  estate_e     st;
  logic [7:0]  left;
  logic [31:0] lfsr;
  logic [31:0] header;
  logic [5:0]  col;
  logic [8:0]  row;

  assign header = {7'b0000001, q_rdata};
  assign col    = 6'(lfsr[31:26] % 6'd50);
  assign row    = 9'(lfsr[25:17] % 9'd192);

  always_comb begin
    word_valid = 1'b0; word = header; word_last = 1'b0; q_ren = 1'b0;
    unique case (st)
      E_IDLE: if (!q_empty) begin
        word_valid = 1'b1; word = header; word_last = n_hits == 0;
        q_ren = word_ready;
      end
      E_HITS: begin
        word_valid = 1'b1; word = {col, row, lfsr[16], lfsr[15:0]};
        word_last  = left == 8'd1;
      end
      default: ;
    endcase
  end

  function automatic logic [31:0] lfsr_step(input logic [31:0] s);
    return s[0] ? (s >> 1) ^ LFSR_TAPS : s >> 1;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= E_IDLE; left <= '0; lfsr <= 32'h1;
    end else if (word_valid && word_ready) begin
      unique case (st)
        E_IDLE: begin
          // seed from the trigger data; never all zero
          lfsr <= lfsr_step(header ^ 32'hA5C3_5A3C);
          left <= n_hits;
          if (n_hits != 0) st <= E_HITS;
        end
        E_HITS: begin
          lfsr <= lfsr_step(lfsr);
          left <= left - 1'b1;
          if (left == 8'd1) st <= E_IDLE;
        end
        default: st <= E_IDLE;
      endcase
    end
endmodule
