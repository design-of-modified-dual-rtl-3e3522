// Module three_operand_ppa: three-operand adder with a parallel-prefix
// carry stage, sum = (a + b + c) mod 2^W.
//
// This is the adder inside each modified LCG, where it forms
// (s << r) + s + b in one clock. It works in two steps:
//   1. Carry-save (bit-addition) stage: one full adder per bit reduces the
//      three operands to a sum word ps and a carry word cs, with
//      a + b + c = ps + 2*cs.
//   2. A two-operand adder adds ps and (cs << 1). Its carries come from a
//      Kogge-Stone prefix tree over (generate, propagate) pairs, so the
//      carry delay grows with log2(W) rather than W.
// Bits that carry beyond W are dropped, which is the mod 2^W of the LCG.
//
// The generator is defined with a "three operand PPA" (parallel-prefix
// adder) in this position; the internal choice of a carry-save stage and a
// Kogge-Stone tree is this design's own.
//
// Interface: a, b, c and sum are W-bit unsigned words. Purely combinational.
module three_operand_ppa #(
  parameter int unsigned W = 32  // at least 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  // Carry-save stage.
  logic [W-1:0] ps;   // bitwise sum
  logic [W-2:0] cs;   // bitwise carry, weight 2^(k+1); the top one leaves the word
  logic [W-1:0] op2;  // cs shifted into place

  always_comb begin
    ps  = a ^ b ^ c;
    cs  = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
    op2 = {cs, 1'b0};
  end

  // Prefix tree: g[l][k], p[l][k] are the group generate/propagate of the
  // bits (k - 2^l + 1) .. k after level l.
  logic [W-1:0] g [LEVELS+1];
  logic [W-1:0] p [LEVELS+1];

  always_comb begin
    g[0] = ps & op2;
    p[0] = ps ^ op2;
    for (int unsigned l = 0; l < LEVELS; l++) begin
      for (int unsigned k = 0; k < W; k++) begin
        if (k >= (1 << l)) begin
          g[l+1][k] = g[l][k] | (p[l][k] & g[l][k - (1 << l)]);
          p[l+1][k] = p[l][k] & p[l][k - (1 << l)];
        end else begin
          g[l+1][k] = g[l][k];
          p[l+1][k] = p[l][k];
        end
      end
    end
  end

  // Carry into bit k is the group generate of bits 0 .. k-1.
  always_comb begin
    sum = p[0] ^ {g[LEVELS][W-2:0], 1'b0};
  end

endmodule
