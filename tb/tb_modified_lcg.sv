// Testbench tb_modified_lcg: self-checking test of one modified LCG,
// s_{i+1} = (2^R * s_i + s_i + B) mod 2^N.
//
// Instance dut32 (N=32, R=6, B=43, multiplier 65):
//   - seed 0 must give the reference sequence 43, 2838, 184513, 11993388,
//     and the instances configured as LCGs 2, 3, 4 (multipliers 33, 17, 5;
//     increments 19, 23, 59) theirs: 19, 646, 21337, 704140;
//     23, 414, 7061, 120060; 59, 354, 1829, 9204;
//   - a random seed is followed for 200 steps against a model that uses a
//     true multiplication by (2^R + 1), one new value per clock;
//   - holding start high must keep reloading f(seed);
//   - a second start in mid-run must reload the new seed.
// Instance dut8 (N=8, R=2, B=59, multiplier 5): the sequence from seed 0
// must return to its first value after exactly 2^8 steps and not before
// (full period, since the multiplier is 1 mod 4 and B is odd).
module tb_modified_lcg;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic        start32, start8;
  logic [31:0] seed32, st32;
  logic [7:0]  seed8, st8;

  modified_lcg #(.N(32), .R(6), .B(32'd43)) dut32 (
    .clk, .start(start32), .seed(seed32), .state(st32));
  // LCGs 2, 3 and 4 of the generator, for their reference sequences.
  logic [31:0] st_y, st_p, st_q;
  modified_lcg #(.N(32), .R(5), .B(32'd19)) dut_y (
    .clk, .start(start32), .seed(seed32), .state(st_y));
  modified_lcg #(.N(32), .R(4), .B(32'd23)) dut_p (
    .clk, .start(start32), .seed(seed32), .state(st_p));
  modified_lcg #(.N(32), .R(2), .B(32'd59)) dut_q (
    .clk, .start(start32), .seed(seed32), .state(st_q));

  modified_lcg #(.N(8), .R(2), .B(8'd59)) dut8 (
    .clk, .start(start8), .seed(seed8), .state(st8));

  function automatic logic [31:0] step32(input logic [31:0] s);
    logic [63:0] prod;
    prod = 64'(s) * 64'd65 + 64'd43;
    return prod[31:0];
  endfunction

  task automatic expect32(input logic [31:0] exp, input string what);
    checks++;
    if (st32 !== exp) begin
      failures++;
      $display("FAIL %s: state %0d, expected %0d", what, st32, exp);
    end
  endtask

  task automatic expect_yqp(input logic [31:0] ey, input logic [31:0] ep,
                            input logic [31:0] eq);
    checks++;
    if (st_y !== ey || st_p !== ep || st_q !== eq) begin
      failures++;
      $display("FAIL ref y/p/q: %0d %0d %0d, expected %0d %0d %0d", st_y, st_p, st_q, ey, ep, eq);
    end
  endtask

  initial begin
    logic [31:0] model;
    logic [7:0]  first8;
    int          period;
    start32 = 1'b0; start8 = 1'b0; seed32 = '0; seed8 = '0;

    // Reference sequence from seed 0.
    @(negedge clk); start32 = 1'b1; seed32 = 32'd0;
    @(negedge clk); start32 = 1'b0;
    expect32(32'd43, "ref[0]");       expect_yqp(32'd19, 32'd23, 32'd59);
    @(negedge clk); expect32(32'd2838, "ref[1]");
    expect_yqp(32'd646, 32'd414, 32'd354);
    @(negedge clk); expect32(32'd184513, "ref[2]");
    expect_yqp(32'd21337, 32'd7061, 32'd1829);
    @(negedge clk); expect32(32'd11993388, "ref[3]");
    expect_yqp(32'd704140, 32'd120060, 32'd9204);

    // Random seed, one value per clock.
    seed32 = $urandom; start32 = 1'b1;
    model = step32(seed32);
    @(negedge clk); start32 = 1'b0;
    expect32(model, "load");
    for (int i = 0; i < 200; i++) begin
      model = step32(model);
      @(negedge clk);
      expect32(model, "run");
    end

    // start held high reloads f(seed) at every edge.
    seed32 = 32'hDEAD_BEEF; start32 = 1'b1;
    repeat (3) begin
      @(negedge clk);
      expect32(step32(32'hDEAD_BEEF), "hold");
    end
    start32 = 1'b0;
    @(negedge clk);
    expect32(step32(step32(32'hDEAD_BEEF)), "after hold");

    // Full period of the 8-bit LCG.
    @(negedge clk); start8 = 1'b1; seed8 = 8'd0;
    @(negedge clk); start8 = 1'b0;
    first8 = st8;
    checks++;
    if (first8 !== 8'd59) begin
      failures++;
      $display("FAIL N=8 first value %0d, expected 59", first8);
    end
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (st8 != first8 && period < 1000);
    checks++;
    if (period != 256) begin
      failures++;
      $display("FAIL N=8 period %0d, expected 256", period);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
