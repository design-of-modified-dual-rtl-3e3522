// Module modified_dual_clcg: modified dual-coupled linear congruential
// pseudorandom bit generator; top of the design.
//
// Four LCGs run in parallel on N-bit words:
//   x_{i+1} = (2^R1*x_i + x_i + B1) mod 2^N      p_{i+1} = (2^R3*p_i + p_i + B3) mod 2^N
//   y_{i+1} = (2^R2*y_i + y_i + B2) mod 2^N      q_{i+1} = (2^R4*q_i + q_i + B4) mod 2^N
// Two comparators form B_i = (x_{i+1} > y_{i+1}) and C_i = (p_{i+1} > q_{i+1}).
// Instead of combining them with a gate, a 2:1 multiplexer chooses one of
// them with the least significant bit of y_{i+1}:
//   Z_i = B_i when y_{i+1}[0] = 0,  Z_i = C_i when y_{i+1}[0] = 1.
// All of this follows the generator's definition. The default word size
// (32) and constants (multipliers 65, 33, 17, 5; increments 43, 19, 23, 59)
// are those of the reference configuration.
//
// Timing: one bit per clock. A clock edge with start high loads every LCG
// with f(seed); Z_i is valid combinationally after that first edge (one
// clock of initial latency) and a new bit follows after every later edge.
// zi is derived combinationally from the four registers.
//
// Interface: clk, start, seeds x0, y0, p0, q0 [N-1:0]; output zi. There is
// no reset; the state is undefined until the first edge with start high.
// Equal words compare as "not greater" (0), a case the equations leave open.
module modified_dual_clcg
  import dual_clcg_pkg::*;
#(
  parameter int unsigned  N  = DEFAULT_N,
  parameter int unsigned  R1 = DEFAULT_R[0],
  parameter int unsigned  R2 = DEFAULT_R[1],
  parameter int unsigned  R3 = DEFAULT_R[2],
  parameter int unsigned  R4 = DEFAULT_R[3],
  parameter logic [N-1:0] B1 = N'(DEFAULT_B[0]),
  parameter logic [N-1:0] B2 = N'(DEFAULT_B[1]),
  parameter logic [N-1:0] B3 = N'(DEFAULT_B[2]),
  parameter logic [N-1:0] B4 = N'(DEFAULT_B[3])
) (
  input  logic         clk,
  input  logic         start,
  input  logic [N-1:0] x0,
  input  logic [N-1:0] y0,
  input  logic [N-1:0] p0,
  input  logic [N-1:0] q0,
  output logic         zi
);

  // LCG words x_{i+1}, y_{i+1}, p_{i+1}, q_{i+1} (LCG outputs 1 to 4).
  logic [N-1:0] x, y, p, q;
  logic         cout1;       // B_i = (x_{i+1} > y_{i+1})
  logic         cout2;       // C_i = (p_{i+1} > q_{i+1})

  modified_lcg #(.N(N), .R(R1), .B(B1)) u_lcg1 (.clk, .start, .seed(x0), .state(x));
  modified_lcg #(.N(N), .R(R2), .B(B2)) u_lcg2 (.clk, .start, .seed(y0), .state(y));
  modified_lcg #(.N(N), .R(R3), .B(B3)) u_lcg3 (.clk, .start, .seed(p0), .state(p));
  modified_lcg #(.N(N), .R(R4), .B(B4)) u_lcg4 (.clk, .start, .seed(q0), .state(q));

  magnitude_comparator #(.W(N)) u_cmp_xy (.a(x), .b(y), .gt(cout1));
  magnitude_comparator #(.W(N)) u_cmp_pq (.a(p), .b(q), .gt(cout2));

  // Output multiplexer, select line y_{i+1}[0].
  always_comb begin
    zi = y[0] ? cout2 : cout1;
  end

endmodule
