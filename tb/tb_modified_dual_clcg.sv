// Testbench tb_modified_dual_clcg: end-to-end, self-checking test of the
// modified dual-CLCG bit generator at its default parameters (N=32,
// multipliers 65, 33, 17, 5, increments 43, 19, 23, 59).
//
// A reference model in this file steps the four LCGs with true
// multiplications, forms B = (x > y), C = (p > q) and picks
// Z = y[0] ? C : B. Every clock the generator's zi is compared with it.
// Runs:
//   1. seeds all 0 (the reference sequences starting 43, 19, 23, 59);
//   2. several random seed sets of 4000 bits each, with start pulsed in
//      mid-run to reseed;
//   3. seeds chosen so that x == y after loading (equal words give B = 0).
// The first bit must be valid right after the first clock edge with start
// high (one clock of latency), and a new bit must come every clock.
// Each mechanism is counted: seed load, output mux choosing B, choosing C,
// cases where B and C differ under each choice, equal comparison. One that
// never happened counts as a failure. The share of ones must lie between
// 45 % and 55 %.
module tb_modified_dual_clcg;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic        start;
  logic [31:0] x0, y0, p0, q0;
  logic        zi;

  modified_dual_clcg dut (.clk, .start, .x0, .y0, .p0, .q0, .zi);

  // Reference model state.
  logic [31:0] mx, my, mp, mq;

  // Mechanism counters.
  int n_load = 0, n_sel_b = 0, n_sel_c = 0, n_b_ne_c_sel_b = 0, n_b_ne_c_sel_c = 0;
  int n_equal = 0, n_bits = 0, n_ones = 0;

  function automatic logic [31:0] lcg(input logic [31:0] s, input int unsigned a,
                                      input int unsigned b);
    logic [63:0] t;
    t = 64'(s) * 64'(a) + 64'(b);
    return t[31:0];
  endfunction

  function automatic void model_step();
    mx = lcg(mx, 65, 43);
    my = lcg(my, 33, 19);
    mp = lcg(mp, 17, 23);
    mq = lcg(mq, 5, 59);
  endfunction

  function automatic logic model_z();
    logic bb, cc;
    bb = mx > my;
    cc = mp > mq;
    return my[0] ? cc : bb;
  endfunction

  // Called at a negedge: compare zi with the model and count mechanisms.
  task automatic check_bit(input string what);
    logic bb, cc, exp;
    bb  = mx > my;
    cc  = mp > mq;
    exp = my[0] ? cc : bb;
    checks++;
    n_bits++;
    if (zi) n_ones++;
    if (my[0]) n_sel_c++; else n_sel_b++;
    if (bb != cc && !my[0]) n_b_ne_c_sel_b++;
    if (bb != cc &&  my[0]) n_b_ne_c_sel_c++;
    if (mx == my) n_equal++;
    if (zi !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: zi=%b expected %b (x=%h y=%h p=%h q=%h)", what, zi, exp, mx, my, mp, mq);
    end
  endtask

  // Load seeds with a one-clock start pulse and check the first bit.
  task automatic load(input logic [31:0] sx, input logic [31:0] sy,
                      input logic [31:0] sp, input logic [31:0] sq);
    x0 = sx; y0 = sy; p0 = sp; q0 = sq;
    start = 1'b1;
    mx = sx; my = sy; mp = sp; mq = sq;
    model_step();
    @(negedge clk);
    start = 1'b0;
    n_load++;
    check_bit("first bit after start");
  endtask

  task automatic run(input int bits);
    for (int i = 0; i < bits; i++) begin
      model_step();
      @(negedge clk);
      check_bit("run");
    end
  endtask

  // Inverse of an odd number modulo 2^32 by Newton iteration.
  function automatic logic [31:0] inv32(input logic [31:0] a);
    logic [31:0] v;
    v = a;
    for (int i = 0; i < 5; i++) v = v * (32'd2 - a * v);
    return v;
  endfunction

  initial begin
    logic [31:0] sx;
    start = 1'b0;
    x0 = '0; y0 = '0; p0 = '0; q0 = '0;
    @(negedge clk);

    // 1. All-zero seeds: the reference sequences; the first bits are
    //    0, 1, 1, 1 (x=43 > y=19 but y odd selects C: 23 > 59 is false).
    load(32'd0, 32'd0, 32'd0, 32'd0);
    run(100);

    // 2. Random seeds, reseeding in mid-run.
    for (int k = 0; k < 5; k++) begin
      load($urandom, $urandom, $urandom, $urandom);
      run(4000);
    end

    // 3. x == y after loading: y0 = 1 gives y = 52 (even, so B is chosen);
    //    x0 = (52 - 43) / 65 mod 2^32.
    sx = 32'd9 * inv32(32'd65);
    load(sx, 32'd1, $urandom, $urandom);
    checks++;
    if (mx !== 32'd52 || my !== 32'd52 || zi !== 1'b0) begin
      failures++;
      $display("FAIL equal words: model x=%0d y=%0d, zi=%b", mx, my, zi);
    end
    run(50);

    // Mechanism coverage.
    checks++;
    if (n_load < 7 || n_sel_b == 0 || n_sel_c == 0 || n_b_ne_c_sel_b == 0 ||
        n_b_ne_c_sel_c == 0 || n_equal == 0) begin
      failures++;
      $display("FAIL coverage: load=%0d selB=%0d selC=%0d B!=C,selB=%0d B!=C,selC=%0d equal=%0d",
               n_load, n_sel_b, n_sel_c, n_b_ne_c_sel_b, n_b_ne_c_sel_c, n_equal);
    end
    checks++;
    if (n_ones * 100 < n_bits * 45 || n_ones * 100 > n_bits * 55) begin
      failures++;
      $display("FAIL balance: %0d ones in %0d bits", n_ones, n_bits);
    end
    $display("bits=%0d ones=%0d loads=%0d selB=%0d selC=%0d B!=C,selB=%0d B!=C,selC=%0d equal=%0d",
             n_bits, n_ones, n_load, n_sel_b, n_sel_c, n_b_ne_c_sel_b, n_b_ne_c_sel_c, n_equal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
