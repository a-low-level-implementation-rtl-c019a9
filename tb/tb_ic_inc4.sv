// Exhaustive test of the 4-bit lookahead incrementer: all 16 values with
// carry-in 0 and 1. The sum and carry-out are compared with plain addition.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ic_inc4;
  logic [3:0] a, s;
  logic       c0, c4;
  int checks = 0, failures = 0;

  ic_inc4 dut (.a, .c0, .s, .c4);

  initial begin
    for (int i = 0; i < 32; i++) begin
      logic [4:0] exp;
      a  = 4'(i);
      c0 = i[4];
      #1;
      exp = {1'b0, a} + {4'b0, c0};
      checks++;
      if ({c4, s} != exp) begin
        failures++;
        $display("FAIL a=%0d c0=%0d got %0d exp %0d", a, c0, {c4, s}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
