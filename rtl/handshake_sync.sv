// Handshake synchronizer for a multi-bit word.
//
// The source side freezes src_data in a holding register and raises
// data_valid; the destination sees it through a sync_ff chain, copies the
// held word into dst_data, pulses dst_update and raises ack; the source sees
// ack through its own chain, drops data_valid, and once ack has fallen again
// it captures the current src_data and starts the next transfer. The
// destination thus mirrors a slowly changing source register with a latency
// of a few clock cycles of each domain. Only the two control bits cross
// through synchronizers; the data bus is stable whenever it is sampled.
// The handshake with two synchronized control lines follows the board
// firmware; the four-phase sequence and the continuous re-send are this
// design's choices.
`timescale 1ns/1ps
module handshake_sync #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned STAGES = 3
) (
  input  logic             src_clk,
  input  logic             src_rst_n,
  input  logic [WIDTH-1:0] src_data,
  input  logic             dst_clk,
  input  logic             dst_rst_n,
  output logic [WIDTH-1:0] dst_data,
  output logic             dst_update   // one dst_clk pulse per received word
);
  typedef enum logic [1:0] { S_LOAD, S_WAIT_ACK, S_WAIT_NACK } src_state_e;

  src_state_e       st;
  logic [WIDTH-1:0] hold;
  logic             data_valid, ack, ack_s, valid_d;

  // ---- source domain ----
  always_ff @(posedge src_clk or negedge src_rst_n)
    if (!src_rst_n) begin
      st <= S_LOAD; hold <= '0; data_valid <= 1'b0;
    end else begin
      unique case (st)
        S_LOAD:      begin hold <= src_data; data_valid <= 1'b1; st <= S_WAIT_ACK; end
        S_WAIT_ACK:  if (ack_s)  begin data_valid <= 1'b0; st <= S_WAIT_NACK; end
        S_WAIT_NACK: if (!ack_s) st <= S_LOAD;
        default:     st <= S_LOAD;
      endcase
    end

  sync_ff #(.STAGES(STAGES)) u_ack_sync (.clk(src_clk), .rst_n(src_rst_n), .d(ack), .q(ack_s));

  // ---- destination domain ----
  logic valid_s;
  sync_ff #(.STAGES(STAGES)) u_valid_sync (.clk(dst_clk), .rst_n(dst_rst_n), .d(data_valid), .q(valid_s));

  always_ff @(posedge dst_clk or negedge dst_rst_n)
    if (!dst_rst_n) begin
      dst_data <= '0; ack <= 1'b0; valid_d <= 1'b0; dst_update <= 1'b0;
    end else begin
      valid_d    <= valid_s;
      dst_update <= 1'b0;
      if (valid_s && !valid_d) begin
        dst_data   <= hold;
        dst_update <= 1'b1;
      end
      ack <= valid_s;
    end
endmodule
