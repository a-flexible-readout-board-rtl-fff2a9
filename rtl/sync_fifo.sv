// Single-clock first-word-fall-through FIFO.
//
// A circular buffer with read and write pointers and an occupancy counter.
// rdata shows the oldest word while empty is low; a write to a full FIFO
// and a read from an empty one are ignored. Used as the event buffer of the
// RD53A emulator; its depth is this design's choice.
`timescale 1ns/1ps
module sync_fifo #(
  parameter int unsigned WIDTH      = 32,
  parameter int unsigned DEPTH_LOG2 = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wen,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             ren,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic [DEPTH_LOG2:0] count
);
  logic [WIDTH-1:0] mem [2**DEPTH_LOG2];
  logic [DEPTH_LOG2-1:0] wp, rp;
  logic do_w, do_r;

  assign full  = count == (DEPTH_LOG2+1)'(2**DEPTH_LOG2);
  assign empty = count == '0;
  assign do_w  = wen && !full;
  assign do_r  = ren && !empty;
  assign rdata = mem[rp];

  always_ff @(posedge clk)
    if (do_w) mem[wp] <= wdata;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_w) wp <= wp + 1'b1;
      if (do_r) rp <= rp + 1'b1;
      count <= count + (DEPTH_LOG2+1)'(do_w) - (DEPTH_LOG2+1)'(do_r);
    end
endmodule
