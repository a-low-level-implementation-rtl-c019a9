// Fast 4-bit incrementer with carry lookahead.
//
// Adds the carry-in c0 to a. For an incrementer the second operand is zero, so
// the generate terms vanish and every carry is the AND of the lower operand bits
// and c0: c(i) = a(i-1)...a(0)·c0. The sum bits are s(i) = a(i) xor c(i) and the
// carry-out c4 = a3·a2·a1·a0·c0. All carries are available after one AND level
// instead of rippling. Combinational. This structure follows the document's
// proposed fast incrementer; here it increments the fetcher's quad pointers.
module ic_inc4 (
  input  logic [3:0] a,
  input  logic       c0,
  output logic [3:0] s,
  output logic       c4
);

  logic [4:0] c;

  assign c[0] = c0;
  assign c[1] = a[0] & c0;
  assign c[2] = a[1] & a[0] & c0;
  assign c[3] = a[2] & a[1] & a[0] & c0;
  assign c[4] = a[3] & a[2] & a[1] & a[0] & c0;

  assign s  = a ^ c[3:0];
  assign c4 = c[4];

endmodule
