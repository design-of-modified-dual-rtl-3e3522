// Testbench tb_three_operand_ppa: self-checking test of the three-operand
// parallel-prefix adder.
//
// Two instances are tested, a 32-bit one (the generator's word size) and an
// 8-bit one. Each is driven with corner cases (all zeros, all ones, single
// bits that make a carry run the whole word) and with random operands. The
// expected sum is the plain SystemVerilog addition truncated to the word
// width. The adder is combinational; a clock only paces the stimulus and
// the watchdog.
module tb_three_operand_ppa;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [31:0] a32, b32, c32, s32;
  logic [7:0]  a8, b8, c8, s8;

  three_operand_ppa #(.W(32)) dut32 (.a(a32), .b(b32), .c(c32), .sum(s32));
  three_operand_ppa #(.W(8))  dut8  (.a(a8),  .b(b8),  .c(c8),  .sum(s8));

  task automatic check32(input logic [31:0] a, input logic [31:0] b, input logic [31:0] c);
    logic [33:0] full;
    a32 = a; b32 = b; c32 = c;
    @(negedge clk);
    full = 34'(a) + 34'(b) + 34'(c);
    checks++;
    if (s32 !== full[31:0]) begin
      failures++;
      $display("FAIL W=32: %h + %h + %h = %h, expected %h", a, b, c, s32, full[31:0]);
    end
  endtask

  task automatic check8(input logic [7:0] a, input logic [7:0] b, input logic [7:0] c);
    logic [9:0] full;
    a8 = a; b8 = b; c8 = c;
    @(negedge clk);
    full = 10'(a) + 10'(b) + 10'(c);
    checks++;
    if (s8 !== full[7:0]) begin
      failures++;
      $display("FAIL W=8: %h + %h + %h = %h, expected %h", a, b, c, s8, full[7:0]);
    end
  endtask

  initial begin
    a32 = '0; b32 = '0; c32 = '0;
    a8  = '0; b8  = '0; c8  = '0;
    // Corner cases.
    check32(32'h0, 32'h0, 32'h0);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check32(32'hFFFF_FFFF, 32'h1, 32'h0);
    check32(32'h7FFF_FFFF, 32'h0, 32'h1);
    check32(32'hFFFF_FFFE, 32'h1, 32'h1);
    check32(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);
    check8(8'hFF, 8'hFF, 8'hFF);
    check8(8'hFF, 8'h01, 8'h00);
    check8(8'h55, 8'hAA, 8'h01);
    for (int i = 0; i < 4000; i++) begin
      check32($urandom, $urandom, $urandom);
      check8(8'($urandom), 8'($urandom), 8'($urandom));
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
