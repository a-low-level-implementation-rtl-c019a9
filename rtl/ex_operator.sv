// Operator conversion example: a combinational block with two functions
// chosen by a two-bit control input.
//
// Function "default" (ctrl = 00) increments in1 when ready is high, wrapping
// at five bits, and places it in out[4:0]. The two low bits of in2 go to
// out[6:5]. Function "generate" (ctrl = 01 or 10) places the two low bits of
// in2 in out[1:0]. out[6:2] gets in2 with bits 2 and 3 cleared when in2
// equals 5, and the constant 31 otherwise. The selection is made with
// multiplexers, as in the gate-level drawing of the example.
//
// Interface: ctrl[1:0], ready, in1[4:0] and in2[4:0] in; out[6:0] out. There is
// no clock: the output follows the inputs within the same cycle.
//
// The functions, the control codes and the field widths follow the
// description. Control code 11 has no function in the description. This
// design treats it like "generate", because the drawing selects the default
// function only when both control bits are low.
module ex_operator (
  input  logic [1:0] ctrl,
  input  logic       ready,
  input  logic [4:0] in1,
  input  logic [4:0] in2,
  output logic [6:0] out
);
  logic [4:0] in1_sel;   // default function, low field
  logic [4:0] gen_hi;    // generate function, high field
  logic       is_default;

  always_comb begin
    is_default = (ctrl == 2'b00);
    in1_sel    = ready ? in1 + 5'd1 : in1;
    gen_hi     = (in2 == 5'd5) ? {in2[4], 2'b00, in2[1:0]} : 5'd31;
    out        = is_default ? {in2[1:0], in1_sel} : {gen_hi, in2[1:0]};
  end
endmodule
