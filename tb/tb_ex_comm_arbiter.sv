// Random test of the communication arbiter against a model of its two
// states. In each cycle at most one OUT is enabled. The system with
// priority is served first, the other's IN is loaded, and priority passes
// on only when the system with priority was served.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ex_comm_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rw1, rw2, en1, en2, load1, load2, prio2, mp2;
  int checks = 0, failures = 0;
  int n_both = 0;

  ex_comm_arbiter dut (.clk, .rst_n, .rw1, .rw2, .en1, .en2, .load1, .load2, .prio2);

  initial begin
    rw1 = 0; rw2 = 0; mp2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      logic e1, e2;
      @(negedge clk);
      rw1 = 1'($urandom_range(1)); rw2 = 1'($urandom_range(1));
      #1;
      e1 = mp2 ? (rw1 && !rw2) : rw1;
      e2 = mp2 ? rw2 : (rw2 && !rw1);
      n_both += (rw1 && rw2);
      checks++;
      if (prio2 != mp2 || en1 != e1 || en2 != e2 || load2 != e1 || load1 != e2) begin
        failures++;
        $display("FAIL prio2=%b/%b en=%b%b/%b%b load=%b%b", prio2, mp2, en1, en2, e1, e2, load1, load2);
      end
      @(posedge clk);
      if (!mp2 && e1) mp2 = 1;
      else if (mp2 && e2) mp2 = 0;
    end
    checks++;
    if (n_both == 0) begin failures++; $display("FAIL no simultaneous requests"); end
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
