// ca_rng: global random number generator of the array.
//
// A one-dimensional ring of W cells, all updated every clock. Each cell looks
// at a neighbourhood of four cells (its left neighbour, itself and the two to
// its right) and takes
//     next[i] = c[i-1] ^ (c[i] | c[i+1]) ^ c[i+2]
// i.e. the chaotic rule 30 with one extra XOR input. Four inputs fit one
// FPGA look-up table per cell, which is what makes cellular automata cheap
// random sources in hardware. The whole state is the W-bit output word, a
// new one every cycle. The all-zero and all-one states are fixed points of
// this rule; should the ring ever reach one, it is reloaded with SEED.
// The document only says that the generator is a cellular automaton shaped
// for hardware; the ring, the rule and the seed are this design's choices.
module ca_rng #(
  parameter int           W    = 160,
  parameter logic [W-1:0] SEED = W'(64'h9E37_79B9_7F4A_7C15) ^ (W'(64'hC2B2_AE3D_27D4_EB4F) << (W/2))
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] rnd
);

  logic [W-1:0] nxt;

  always_comb begin
    for (int i = 0; i < W; i++)
      nxt[i] = rnd[(i + W - 1) % W] ^ (rnd[i] | rnd[(i + 1) % W]) ^ rnd[(i + 2) % W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         rnd <= SEED;
    else if (nxt == '0 || nxt == '1)    rnd <= SEED;
    else                                rnd <= nxt;
  end

endmodule
