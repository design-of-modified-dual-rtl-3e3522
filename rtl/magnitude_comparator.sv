// Module magnitude_comparator: unsigned inequality comparator of the
// modified dual-CLCG generator.
//
// gt is 1 when a > b and 0 otherwise; it gives the bit B_i = (x > y) or
// C_i = (p > q). The case a == b is not defined by the generator's
// equations: this design returns 0 for it (strict comparison).
//
// How it works: the comparison is decided by the most significant bit where
// a and b differ. A bit-serial scan from the LSB up keeps "a greater so far";
// each higher bit where the operands differ overrides it. The loop is
// unrolled into a purely combinational chain. This structure is this
// design's choice; only the function is part of the generator's definition.
//
// Interface: a, b are W-bit unsigned words; gt is combinational, no clock.
module magnitude_comparator #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         gt
);

  always_comb begin
    gt = 1'b0;
    for (int unsigned k = 0; k < W; k++) begin
      if (a[k] != b[k]) gt = a[k];
    end
  end

endmodule
