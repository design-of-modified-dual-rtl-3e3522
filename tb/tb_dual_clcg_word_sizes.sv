// Testbench tb_dual_clcg_word_sizes: the modified dual-CLCG generator at the
// two smaller word sizes it is meant to scale to, N = 8 and N = 16, with
// the default shifts and increments.
//
// For each size a reference model (true multiplications, reduced mod 2^N)
// is stepped beside the generator and zi is compared every clock, over
// three random seed sets of 3 * 2^N bits for N = 8 and 2^16 + 100 bits
// for N = 16 (one random set). Since all four LCGs have period 2^N, the
// bit stream must repeat with period 2^N: this is checked on the N = 8
// stream by comparing every bit with the bit 256 clocks earlier.
module tb_dual_clcg_word_sizes;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic        start8, start16;
  logic [7:0]  s8  [4];
  logic [15:0] s16 [4];
  logic        z8, z16;

  modified_dual_clcg #(.N(8)) dut8 (
    .clk, .start(start8), .x0(s8[0]), .y0(s8[1]), .p0(s8[2]), .q0(s8[3]), .zi(z8));
  modified_dual_clcg #(.N(16)) dut16 (
    .clk, .start(start16), .x0(s16[0]), .y0(s16[1]), .p0(s16[2]), .q0(s16[3]), .zi(z16));

  localparam int unsigned MUL [4] = '{65, 33, 17, 5};
  localparam int unsigned INC [4] = '{43, 19, 23, 59};

  // Model: state words held in 64 bits, reduced mod 2^n after every step.
  function automatic void step(ref longint unsigned st[4], input int unsigned n);
    for (int k = 0; k < 4; k++)
      st[k] = (st[k] * MUL[k] + 64'(INC[k])) & ((64'd1 << n) - 1);
  endfunction

  function automatic logic zbit(input longint unsigned st[4]);
    return st[1][0] ? (st[2] > st[3]) : (st[0] > st[1]);
  endfunction

  initial begin
    longint unsigned m[4];
    logic hist [256];
    logic exp;
    start8 = 1'b0; start16 = 1'b0;
    foreach (s8[k])  s8[k]  = '0;
    foreach (s16[k]) s16[k] = '0;

    // N = 8.
    for (int run = 0; run < 3; run++) begin
      foreach (s8[k]) begin
        s8[k] = 8'($urandom);
        m[k]  = 64'(s8[k]);
      end
      start8 = 1'b1;
      step(m, 8);
      @(negedge clk);
      start8 = 1'b0;
      for (int i = 0; i < 3 * 256; i++) begin
        exp = zbit(m);
        checks++;
        if (z8 !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 bit %0d: %b expected %b", i, z8, exp);
        end
        if (i >= 256) begin
          checks++;
          if (z8 !== hist[i % 256]) begin
            failures++;
            if (failures < 10) $display("FAIL N=8 period: bit %0d differs from bit %0d", i, i - 256);
          end
        end
        hist[i % 256] = z8;
        step(m, 8);
        @(negedge clk);
      end
    end

    // N = 16.
    foreach (s16[k]) begin
      s16[k] = 16'($urandom);
      m[k]   = 64'(s16[k]);
    end
    start16 = 1'b1;
    step(m, 16);
    @(negedge clk);
    start16 = 1'b0;
    for (int i = 0; i < 65536 + 100; i++) begin
      exp = zbit(m);
      checks++;
      if (z16 !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 bit %0d: %b expected %b", i, z16, exp);
      end
      step(m, 16);
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
