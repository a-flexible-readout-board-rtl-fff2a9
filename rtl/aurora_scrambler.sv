// Aurora 64b/66b payload scrambler / descrambler.
//
// Self-synchronizing scrambler with polynomial G(x) = 1 + x^39 + x^58 applied
// to the 64-bit payload of each block; the 2-bit sync header is not
// scrambled. Bit 63 of the payload is the first bit on the wire. Each output
// bit is the input bit XOR the scrambled-stream bits 39 and 58 positions
// earlier. The state is the last 58 bits of the scrambled stream; the
// scrambler takes them from its own output, the descrambler from its input,
// so a descrambler locks on its own after 58 bits whatever its start state.
// One block is processed per cycle with en high; dout is registered and
// valid the cycle after en. The polynomial follows Aurora 64b/66b; the
// bit order and the all-ones start state are this design's choices.
`timescale 1ns/1ps
module aurora_scrambler #(
  parameter bit DESCRAMBLE = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [63:0] din,
  output logic [63:0] dout
);
  logic [57:0] state;       // state[0] = most recent scrambled bit
  logic [57:0] state_nxt;
  logic [63:0] res;

  always_comb begin
    logic [57:0] s;
    logic        b;
    s = state;
    for (int k = 63; k >= 0; k--) begin
      b      = din[k] ^ s[38] ^ s[57];
      res[k] = b;
      s      = {s[56:0], DESCRAMBLE ? din[k] : b};
    end
    state_nxt = s;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= '1;
      dout  <= '0;
    end else if (en) begin
      state <= state_nxt;
      dout  <= res;
    end
endmodule
