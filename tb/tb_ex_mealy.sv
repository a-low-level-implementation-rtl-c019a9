// Random test of the Mealy machine example against its state table. The
// output is checked in the cycle of the input (Mealy behaviour) and the
// state after the clock edge. Every table entry must be exercised.
// The state table follows the original example; the handling of inputs that
// the table leaves open is this design's choice.
module tb_ex_mealy;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] pi, po, state;
  int checks = 0, failures = 0;
  int hit [3][3];

  ex_mealy dut (.clk, .rst_n, .pi, .po, .state);

  // state table: {next, out} for state A=0, B=1, C=2 and input 00, 01, 10
  localparam logic [3:0] TBL [3][3] = '{
    '{4'b10_00, 4'b01_01, 4'b10_10},
    '{4'b10_01, 4'b00_00, 4'b01_01},
    '{4'b00_10, 4'b01_10, 4'b10_00}
  };

  logic [1:0] ms;

  initial begin
    pi = 2'b11; ms = 0;   // 11 holds the state until the first checked input
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (state != ms) begin failures++; $display("FAIL state %0d exp %0d", state, ms); end
      pi = ($urandom_range(9) == 0) ? 2'b11 : 2'($urandom_range(2));
      #1;
      if (pi != 2'b11 && !(ms == 2 && pi == 2'b10)) begin
        checks++;
        if (po != TBL[ms][pi][1:0]) begin failures++; $display("FAIL out %b exp %b state %0d pi %b", po, TBL[ms][pi][1:0], ms, pi); end
        hit[ms][pi]++;
        ms = TBL[ms][pi][3:2];
      end
    end
    for (int s = 0; s < 3; s++)
      for (int p = 0; p < 3; p++)
        if (!(s == 2 && p == 2)) begin
          checks++;
          if (hit[s][p] == 0) begin failures++; $display("FAIL entry %0d/%0d never used", s, p); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
