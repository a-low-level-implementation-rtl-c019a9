// Random test of the scan flip-flop: normal capture of D, scan capture of
// DT when TST is high, asynchronous reset by NRST (also between clock
// edges), and NY as the inverse of Y.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ex_scan_ff;
  logic TST, D, DT, CK = 0, NRST, Y, NY, m;
  int checks = 0, failures = 0;
  int n_async = 0;

  ex_scan_ff dut (.TST, .D, .DT, .CK, .NRST, .Y, .NY);

  initial begin
    TST = 0; D = 0; DT = 0; NRST = 0; m = 0;
    #3 NRST = 1;
    for (int i = 0; i < 3000; i++) begin
      TST = 1'($urandom_range(1)); D = 1'($urandom_range(1)); DT = 1'($urandom_range(1));
      #5 CK = 1;
      m = TST ? DT : D;
      #1;
      if ($urandom_range(15) == 0) begin NRST = 0; m = 0; n_async++; #1 NRST = 1; end
      checks++;
      if (Y != m || NY != !m) begin failures++; $display("FAIL Y=%b NY=%b exp %b", Y, NY, m); end
      #4 CK = 0;
    end
    checks++;
    if (n_async == 0) begin failures++; $display("FAIL no reset tested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
