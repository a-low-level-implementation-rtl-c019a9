// 4-bit register loaded through a PLA from an 8-bit control connector.
//
// Each product term of the PLA matches the control word with some bits
// don't-care. Each term that matches drives the ones of its register value.
// The four output lines are the OR of those values. When at least one term
// matches, the register is loaded with the OR. Otherwise it holds. The terms,
// written with the leftmost character as ctrl[7]:
//   00000001 -> 1    10011001 -> 3    10000001 -> 3    xxxx1100 -> 7
//   xxxx1110 -> 7    011000xx -> 13   100100xx -> 15   x11xx00x -> 9
// The terms are kept as the specification gives them. A logic minimizer
// reduces them to seven product terms with the same outputs. The testbench
// checks against that reduced form.
//
// Interface: clk, asynchronous active-low rst_n, ctrl[7:0] in; r[3:0] out.
// The register changes on the rising clock edge.
//
// The term table follows the description. These are this design's choices:
// the bit order, that several matching terms are ORed (as a PLA does), the
// hold when none matches, and the reset to 0.
module ex_pla_register (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] ctrl,
  output logic [3:0] r
);
  localparam int TERMS = 8;

  typedef struct packed {
    logic [7:0] care;   // 1 where the term tests the bit
    logic [7:0] value;  // required value of the tested bits
    logic [3:0] out;    // register value of the term
  } term_t;

  localparam term_t PLA [TERMS] = '{
    '{care: 8'hFF, value: 8'b0000_0001, out: 4'd1},
    '{care: 8'hFF, value: 8'b1001_1001, out: 4'd3},
    '{care: 8'hFF, value: 8'b1000_0001, out: 4'd3},
    '{care: 8'h0F, value: 8'b0000_1100, out: 4'd7},
    '{care: 8'h0F, value: 8'b0000_1110, out: 4'd7},
    '{care: 8'hFC, value: 8'b0110_0000, out: 4'd13},
    '{care: 8'hFC, value: 8'b1001_0000, out: 4'd15},
    '{care: 8'b0110_0110, value: 8'b0110_0000, out: 4'd9}
  };

  logic       any;
  logic [3:0] or_plane;

  always_comb begin
    any      = 1'b0;
    or_plane = '0;
    for (int t = 0; t < TERMS; t++)
      if (((ctrl ^ PLA[t].value) & PLA[t].care) == 8'h00) begin
        any      = 1'b1;
        or_plane = or_plane | PLA[t].out;
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   r <= '0;
    else if (any) r <= or_plane;
endmodule
