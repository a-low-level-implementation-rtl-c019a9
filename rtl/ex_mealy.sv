// Three-state Mealy machine conversion example.
//
// The state register holds one of A (00), B (01) and C (10). The next state
// and the two-bit output are combinational functions of the state and the
// two-bit input pi, taken from the example's state table:
//   A: pi=00 -> C/00, pi=01 -> B/01, pi=10 -> C/10
//   B: pi=00 -> C/01, pi=01 -> A/00, pi=10 -> B/01
//   C: pi=00 -> A/10, pi=01 -> B/10
// Because it is a Mealy machine, the output belongs to the current cycle
// and the state changes at the next rising clock edge.
//
// Interface: clk, asynchronous active-low rst_n (to state A), pi[1:0] in;
// po[1:0] out, state[1:0] out.
//
// The table entries follow the description. The table leaves C with pi=10
// and every pi=11 open. This design keeps the state there and outputs 00.
// The reset state A is also this design's choice.
module ex_mealy (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] pi,
  output logic [1:0] po,
  output logic [1:0] state
);
  typedef enum logic [1:0] {S_A = 2'b00, S_B = 2'b01, S_C = 2'b10} mstate_e;

  mstate_e cur, nxt;

  always_comb begin
    nxt = cur;
    po  = 2'b00;
    unique case (cur)
      S_A: unique case (pi)
             2'b00:   begin nxt = S_C; po = 2'b00; end
             2'b01:   begin nxt = S_B; po = 2'b01; end
             2'b10:   begin nxt = S_C; po = 2'b10; end
             default: ;
           endcase
      S_B: unique case (pi)
             2'b00:   begin nxt = S_C; po = 2'b01; end
             2'b01:   begin nxt = S_A; po = 2'b00; end
             2'b10:   begin nxt = S_B; po = 2'b01; end
             default: ;
           endcase
      S_C: unique case (pi)
             2'b00:   begin nxt = S_A; po = 2'b10; end
             2'b01:   begin nxt = S_B; po = 2'b10; end
             default: ;
           endcase
      default: nxt = S_A;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cur <= S_A;
    else        cur <= nxt;

  assign state = cur;
endmodule
