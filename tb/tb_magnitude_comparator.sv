// Testbench tb_magnitude_comparator: self-checking test of the unsigned
// comparator gt = (a > b).
//
// A 4-bit instance is checked over all 256 operand pairs, a 32-bit instance
// with corner cases (equal words, words differing only in the MSB or LSB)
// and random pairs. Expected values come from the SystemVerilog ">"
// operator on unsigned operands; equal words must give 0.
module tb_magnitude_comparator;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [31:0] a32, b32;
  logic [3:0]  a4, b4;
  logic        gt32, gt4;

  magnitude_comparator #(.W(32)) dut32 (.a(a32), .b(b32), .gt(gt32));
  magnitude_comparator #(.W(4))  dut4  (.a(a4),  .b(b4),  .gt(gt4));

  task automatic check32(input logic [31:0] a, input logic [31:0] b);
    a32 = a; b32 = b;
    @(negedge clk);
    checks++;
    if (gt32 !== (a > b)) begin
      failures++;
      $display("FAIL W=32: %h > %h gave %b", a, b, gt32);
    end
  endtask

  initial begin
    logic [31:0] r;
    a32 = '0; b32 = '0; a4 = '0; b4 = '0;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        @(negedge clk);
        checks++;
        if (gt4 !== (i > j)) begin
          failures++;
          $display("FAIL W=4: %0d > %0d gave %b", i, j, gt4);
        end
      end
    end
    check32(32'h0, 32'h0);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check32(32'h8000_0000, 32'h7FFF_FFFF);
    check32(32'h7FFF_FFFF, 32'h8000_0000);
    check32(32'h1234_5679, 32'h1234_5678);
    check32(32'h1234_5678, 32'h1234_5679);
    for (int i = 0; i < 3000; i++) begin
      r = $urandom;
      check32($urandom, $urandom);
      check32(r, r);
      check32(r, r ^ (32'h1 << ($urandom % 32)));
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
