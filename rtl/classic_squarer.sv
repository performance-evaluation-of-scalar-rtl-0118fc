// classic_squarer: combinational squaring in GF(2^233), sq = a^2 mod f.
//
// Squaring a binary polynomial only spreads its coefficients: bit i of a
// becomes bit 2i of the 465-bit square and every odd position is zero. The
// spread vector is then reduced by f(x) = x^233 + x^74 + 1, folding each
// coefficient at position i >= 233 back onto positions i-233 and i-159.
// The zero-interleaving follows the classic squaring scheme of the
// design; the reduction network is written as a generic top-down fold and
// left to synthesis to flatten into XOR trees.
//
// Low even output bits that no folded term reaches are plain copies of
// input bits (sq[2i] = a[i]); that is the nature of squaring, not unused
// logic.
//
// Interface: a (233 bits) in, sq (233 bits) out. Purely combinational, no
// clock: the instantiating block registers the result.
module classic_squarer
  import gf233_pkg::*;
(
  input  gf_t a,
  output gf_t sq
);

  logic [2*M-2:0] spread;

  always_comb begin
    spread = '0;
    for (int i = 0; i < int'(M); i++) spread[2*i] = a[i];
  end

  assign sq = gf_reduce(spread);

endmodule
