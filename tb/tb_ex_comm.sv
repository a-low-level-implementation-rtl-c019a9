// End-to-end test of the bus communication example. Every word a system
// places in its OUT register must arrive, unchanged and in order, in the
// other system's IN register. It must cross the shared bus in the cycle its
// enable is high. Both directions must carry words, and the arbiter must
// meet both systems requesting at once.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ex_comm;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] bus, in1, in2, gen1, gen2;
  logic       xfer12, xfer21, prio2, wait1, wait2;
  logic [7:0] q12 [$], q21 [$];
  int checks = 0, failures = 0;
  int n12 = 0, n21 = 0, n_both = 0;

  ex_comm dut (.clk, .rst_n, .bus, .in1_data(in1), .in2_data(in2), .xfer12, .xfer21, .prio2,
               .gen1, .gen2, .wait1, .wait2);

  always @(posedge clk) if (rst_n) begin
    logic [7:0] w;
    if (dut.u_sys1.fire) q12.push_back(gen1);
    if (dut.u_sys2.fire) q21.push_back(gen2);
    n_both += (dut.rw1 && dut.rw2);
    checks++;
    if (xfer12 && xfer21) begin failures++; $display("FAIL both drive the bus"); end
    if (xfer12) begin
      checks += 2;
      w = q12.pop_front();
      if (bus != w) begin failures++; $display("FAIL bus %h exp %h", bus, w); end
      @(negedge clk);
      if (in2 != w) begin failures++; $display("FAIL IN2 %h exp %h", in2, w); end
      n12++;
    end else if (xfer21) begin
      checks += 2;
      w = q21.pop_front();
      if (bus != w) begin failures++; $display("FAIL bus %h exp %h", bus, w); end
      @(negedge clk);
      if (in1 != w) begin failures++; $display("FAIL IN1 %h exp %h", in1, w); end
      n21++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3000) @(negedge clk);
    checks += 2;
    if (n12 == 0 || n21 == 0) begin failures++; $display("FAIL a direction never used"); end
    if (n_both == 0) begin failures++; $display("FAIL arbiter never saw both requests"); end
    $display("words 1->2 %0d, 2->1 %0d, both waiting %0d cycles", n12, n21, n_both);
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
