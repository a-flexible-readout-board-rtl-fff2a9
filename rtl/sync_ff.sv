// Flip-flop chain synchronizer for one asynchronous bit.
//
// The input is sampled by STAGES flip-flops clocked by the destination
// clock; the first may go metastable and the following ones give it time to
// settle, so q follows d after STAGES destination clock edges.
// The three-stage default is the depth the board firmware uses for its
// single-bit control signals; the reset value 0 is this design's choice.
`timescale 1ns/1ps
module sync_ff #(
  parameter int unsigned STAGES = 3
) (
  input  logic clk,
  input  logic rst_n,   // destination-domain reset, active low
  input  logic d,
  output logic q
);
  (* ASYNC_REG = "TRUE" *) logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) chain <= '0;
    else        chain <= {chain[STAGES-2:0], d};

  assign q = chain[STAGES-1];

  initial assert (STAGES >= 2) else $error("sync_ff needs at least two stages");
endmodule
