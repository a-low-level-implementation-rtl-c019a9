// Scan flip-flop: a D flip-flop with a test multiplexer in front of it.
//
// With TST low the flip-flop takes D at the rising edge of CK. With TST high
// it is in scan mode and takes the scan input DT instead. NRST clears it at
// once, independent of the clock. Y is the stored bit and NY its inverse.
//
// Pin names, the function of each pin and the active levels follow the
// description. The asynchronous reset is this design's reading of "low
// active input for resetting the FF".
module ex_scan_ff (
  input  logic TST,
  input  logic D,
  input  logic DT,
  input  logic CK,
  input  logic NRST,
  output logic Y,
  output logic NY
);
  always_ff @(posedge CK or negedge NRST)
    if (!NRST) Y <= 1'b0;
    else       Y <= TST ? DT : D;

  assign NY = ~Y;
endmodule
