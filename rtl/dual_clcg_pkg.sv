// Package dual_clcg_pkg: the shared constants of the modified dual-CLCG
// pseudorandom bit generator.
//
// The generator runs four linear congruential generators (LCGs) of the form
// s_{i+1} = (2^r * s_i + s_i + b) mod 2^N. Each multiplier is 2^r + 1, so a
// multiplication is a shift and an add. The word size of 32 bits and the
// shift/increment pairs (r, b) = (6, 43), (5, 19), (4, 23), (2, 59) are the
// reference configuration; they give multipliers 65, 33, 17 and 5. Every
// multiplier is 1 mod 4 and every increment is odd, so each LCG has the full
// period 2^N.
package dual_clcg_pkg;

  // Word size of each LCG.
  localparam int unsigned DEFAULT_N = 32;

  // Number of LCGs in the generator.
  localparam int unsigned NUM_LCG = 4;

  // Shift amounts r1..r4 (multiplier a_k = 2^r_k + 1).
  localparam int unsigned DEFAULT_R [NUM_LCG] = '{6, 5, 4, 2};

  // Additive constants b1..b4.
  localparam longint unsigned DEFAULT_B [NUM_LCG] = '{43, 19, 23, 59};

endpackage
