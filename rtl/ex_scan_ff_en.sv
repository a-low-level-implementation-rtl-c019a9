// Scan flip-flop with an enable: the extended scan cell.
//
// A first multiplexer picks D when EN is high and feeds the flip-flop's own
// output Q back when EN is low, so the cell holds. A second multiplexer
// picks the scan input DT instead when TST is high, whatever D and EN are.
// The result is clocked in at the rising edge of CK. NQ is the inverse of Q.
//
// Pin names, the two multiplexers and their control follow the
// description. The cell has no reset pin, as described. Its first value
// comes in through the scan path.
module ex_scan_ff_en (
  input  logic TST,
  input  logic EN,
  input  logic D,
  input  logic DT,
  input  logic CK,
  output logic Q,
  output logic NQ
);
  logic d_en;

  assign d_en = EN ? D : Q;

  always_ff @(posedge CK)
    Q <= TST ? DT : d_en;

  assign NQ = ~Q;
endmodule
