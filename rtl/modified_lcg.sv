// Module modified_lcg: one linear congruential generator of the modified
// dual-CLCG bit generator, s_{i+1} = (2^R * s_i + s_i + B) mod 2^N.
//
// How it works: a 2:1 multiplexer picks the current value s_i, which is the
// seed while start is high and the register's own output otherwise. The
// value is shifted left by R (a wiring-only multiply by 2^R), and the
// shifted value, the unshifted value and the constant B are added by a
// three-operand parallel-prefix adder. The N-bit register takes the sum on
// every rising clock edge. The mux, shift, adder and register follow the
// generator's block diagram; the adder's insides are described in
// three_operand_ppa.
//
// Timing: with start high at a clock edge, state becomes f(seed) right
// after that edge; after each following edge with start low, state becomes
// f(state). There is no reset: start is the only initialisation, so state
// is undefined until the first clock edge with start high (this design's
// choice, as the generator's port list has no reset).
//
// Interface: clk, start, seed[N-1:0] in; state[N-1:0] = s_{i+1} out,
// registered.
module modified_lcg #(
  parameter int unsigned          N = 32,
  parameter int unsigned          R = 6,
  parameter logic [N-1:0]         B = N'(43)
) (
  input  logic         clk,
  input  logic         start,
  input  logic [N-1:0] seed,
  output logic [N-1:0] state
);

  logic [N-1:0] cur;      // s_i: output of the seed/feedback mux
  logic [N-1:0] shifted;  // s_i << R
  logic [N-1:0] nxt;      // s_{i+1}

  always_comb begin
    cur     = start ? seed : state;
    shifted = cur << R;
  end

  three_operand_ppa #(.W(N)) u_add (
    .a   (shifted),
    .b   (cur),
    .c   (B),
    .sum (nxt)
  );

  always_ff @(posedge clk) begin
    state <= nxt;
  end

  // A shift of 0 or of N or more makes the multiplier 2 or 1 (mod 2^N).
  initial begin
    assert (R >= 1 && R < N)
      else $error("modified_lcg: shift R=%0d must satisfy 1 <= R < N=%0d", R, N);
  end

endmodule
