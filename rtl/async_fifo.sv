// Dual-clock FIFO with Gray-coded pointers.
//
// Words are written into a dual-port RAM in the write clock domain and read
// from it in the read clock domain. Each side keeps a binary pointer one bit
// wider than the address and sends its Gray-coded copy through a flip-flop
// synchronizer to the other side, where full and empty are computed; since
// only one Gray bit changes per step, a pointer sampled mid-change is off by
// at most one position and the flags stay conservative.
// The read port is first-word-fall-through: rdata shows the oldest word
// while empty is low, and ren removes it. Full and empty update the cycle
// after a write or read; the other side sees a change after the
// synchronizer delay. The Gray-pointer dual-port RAM structure is the one
// the board firmware names for this crossing; depth and width are this
// design's choices.
`timescale 1ns/1ps
module async_fifo #(
  parameter int unsigned WIDTH      = 35,
  parameter int unsigned DEPTH_LOG2 = 9,
  parameter int unsigned STAGES     = 2
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wen,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             ren,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int unsigned AW = DEPTH_LOG2;

  logic [WIDTH-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w, wgray_r;   // synchronized copies

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---- write side ----
  logic [AW:0] wbin_nxt;
  assign wbin_nxt = wbin + (AW+1)'(wen && !full);

  always_ff @(posedge wclk)
    if (wen && !full) mem[wbin[AW-1:0]] <= wdata;

  always_ff @(posedge wclk or negedge wrst_n)
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; full <= 1'b0;
    end else begin
      wbin  <= wbin_nxt;
      wgray <= bin2gray(wbin_nxt);
      full  <= bin2gray(wbin_nxt) == {~rgray_w[AW:AW-1], rgray_w[AW-2:0]};
    end

  // ---- read side ----
  logic [AW:0] rbin_nxt;
  assign rbin_nxt = rbin + (AW+1)'(ren && !empty);

  always_ff @(posedge rclk or negedge rrst_n)
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; empty <= 1'b1;
    end else begin
      rbin  <= rbin_nxt;
      rgray <= bin2gray(rbin_nxt);
      empty <= bin2gray(rbin_nxt) == wgray_r;
    end

  assign rdata = mem[rbin[AW-1:0]];

  // ---- pointer synchronizers ----
  for (genvar i = 0; i <= AW; i++) begin : g_sync
    sync_ff #(.STAGES(STAGES)) u_w2r (.clk(rclk), .rst_n(rrst_n), .d(wgray[i]), .q(wgray_r[i]));
    sync_ff #(.STAGES(STAGES)) u_r2w (.clk(wclk), .rst_n(wrst_n), .d(rgray[i]), .q(rgray_w[i]));
  end

  initial assert (AW >= 2) else $error("async_fifo: DEPTH_LOG2 must be at least 2");
endmodule
