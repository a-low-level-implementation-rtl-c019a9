// Random test of the four kinds of signal semaphores side by side. All four
// get the same random set, reset and pulse commands. Each output is compared
// with a model of the description:
//   pulsed only:  high for the clock period after a pulse;
//   level only:   set or reset at the next clock, set winning;
//   level/pulsed: OR of a pulse flip-flop and an untouched level flip-flop;
//   pulse/level:  as level/pulsed, but a pulse also resets the level.
// Reset values: pulse flip-flops 0, level flip-flops 1 here (LEVEL_INIT).
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ex_signal;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic set, reset, pulse;
  logic [3:0] q;
  logic mp, ml [4];
  int checks = 0, failures = 0;
  int n_pulse_over_level = 0;

  for (genvar k = 0; k < 4; k++) begin : g
    ex_signal #(.KIND(k), .LEVEL_INIT(1'b1)) dut (.clk, .rst_n, .set, .reset, .pulse, .q(q[k]));
  end

  initial begin
    set = 0; reset = 0; pulse = 0;
    #1;
    mp = 0; ml[0] = 0; ml[1] = 1; ml[2] = 1; ml[3] = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (q != 4'b1110) begin failures++; $display("FAIL reset values %b", q); end
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (q != {mp | ml[3], mp | ml[2], ml[1], mp}) begin
        failures++;
        $display("FAIL q=%b exp=%b", q, {mp | ml[3], mp | ml[2], ml[1], mp});
      end
      set   = ($urandom_range(5) == 0);
      reset = ($urandom_range(5) == 0);
      pulse = ($urandom_range(3) == 0);
      @(posedge clk);
      n_pulse_over_level += (pulse && ml[3] && !set);
      mp = pulse;
      for (int k = 1; k < 4; k++)
        if (set) ml[k] = 1;
        else if (reset || (k == 3 && pulse)) ml[k] = 0;
    end
    checks++;
    if (n_pulse_over_level == 0) begin failures++; $display("FAIL pulse on a set pulse/level signal never seen"); end
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
