// Random test of the scan flip-flop with enable. The cell is first loaded
// through the scan path (it has no reset). Then random TST, EN, D and DT
// are applied: scan capture when TST is high, capture of D when EN is high,
// hold otherwise. NQ must be the inverse of Q.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ex_scan_ff_en;
  logic TST, EN, D, DT, CK = 0, Q, NQ, m;
  int checks = 0, failures = 0;
  int n_hold = 0;

  ex_scan_ff_en dut (.TST, .EN, .D, .DT, .CK, .Q, .NQ);

  initial begin
    TST = 1; EN = 0; D = 0; DT = 0;
    #5 CK = 1; #5 CK = 0;
    m = 0;
    for (int i = 0; i < 3000; i++) begin
      TST = ($urandom_range(3) == 0); EN = 1'($urandom_range(1)); D = 1'($urandom_range(1)); DT = 1'($urandom_range(1));
      #5 CK = 1;
      if (TST) m = DT;
      else if (EN) m = D;
      else n_hold += (D != m);
      #1;
      checks++;
      if (Q != m || NQ != !m) begin failures++; $display("FAIL Q=%b NQ=%b exp %b", Q, NQ, m); end
      #4 CK = 0;
    end
    checks++;
    if (n_hold == 0) begin failures++; $display("FAIL hold never tested"); end
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
