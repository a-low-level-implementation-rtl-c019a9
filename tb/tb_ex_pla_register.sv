// Exhaustive test of the PLA-controlled register against the minimized
// cover of its control terms (seven product terms, leftmost bit = ctrl[7]):
//   x0000001 -> 0001   100x0001 -> 0010   1001x001 -> 0011
//   100100xx -> 1111   011000xx -> 1101   x11xx00x -> 1001
//   xxxx11x0 -> 0111
// Every control word is applied in random order. The register must take
// the OR of the matching terms, or hold when none matches.
// The terms follow the original PLA listing; the order of stimulus and the
// reference model are this testbench's own.
module tb_ex_pla_register;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] ctrl;
  logic [3:0] r, m;
  int checks = 0, failures = 0;
  int order [256];

  ex_pla_register dut (.clk, .rst_n, .ctrl, .r);

  function automatic bit match(logic [7:0] c, string pat);
    for (int b = 0; b < 8; b++)
      if (pat[b] != "x" && c[7 - b] != (pat[b] == "1")) return 0;
    return 1;
  endfunction

  function automatic logic [4:0] min_cover(logic [7:0] c);   // {any, value}
    logic [3:0] v = '0;
    logic       a = 0;
    if (match(c, "x0000001")) begin a = 1; v |= 4'b0001; end
    if (match(c, "100x0001")) begin a = 1; v |= 4'b0010; end
    if (match(c, "1001x001")) begin a = 1; v |= 4'b0011; end
    if (match(c, "100100xx")) begin a = 1; v |= 4'b1111; end
    if (match(c, "011000xx")) begin a = 1; v |= 4'b1101; end
    if (match(c, "x11xx00x")) begin a = 1; v |= 4'b1001; end
    if (match(c, "xxxx11x0")) begin a = 1; v |= 4'b0111; end
    return {a, v};
  endfunction

  initial begin
    ctrl = 0; m = 0;
    foreach (order[i]) order[i] = i;
    for (int i = 255; i > 0; i--) begin
      int j, t;
      j = $urandom_range(i);
      t = order[i];
      order[i] = order[j];
      order[j] = t;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++)
      foreach (order[i]) begin
        logic [4:0] cv;
        ctrl = 8'(order[i]);
        cv = min_cover(ctrl);
        @(negedge clk);
        if (cv[4]) m = cv[3:0];
        checks++;
        if (r != m) begin failures++; $display("FAIL ctrl=%b r=%b exp=%b", ctrl, r, m); end
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
