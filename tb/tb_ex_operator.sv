// Exhaustive test of the operator example: every control code, ready value
// and pair of 5-bit inputs. The expected output is computed field by field.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ex_operator;
  logic [1:0] ctrl;
  logic       ready;
  logic [4:0] in1, in2;
  logic [6:0] out, exp;
  int checks = 0, failures = 0;

  ex_operator dut (.ctrl, .ready, .in1, .in2, .out);

  initial begin
    for (int i = 0; i < 4 * 2 * 32 * 32; i++) begin
      {ctrl, ready, in1, in2} = 13'(i);
      #1;
      if (ctrl == 2'b00) begin
        exp[4:0] = ready ? 5'((int'(in1) + 1) % 32) : in1;
        exp[6:5] = in2[1:0];
      end else begin
        exp[1:0] = in2[1:0];
        exp[6:2] = (in2 == 5'd5) ? 5'b00001 : 5'b11111;   // 5 with bits 2..3 cleared is 1
      end
      checks++;
      if (out != exp) begin
        failures++;
        $display("FAIL ctrl=%b ready=%b in1=%0d in2=%0d out=%b exp=%b", ctrl, ready, in1, in2, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
