// One of the two identical systems of the bus communication example.
//
// The system has three 8-bit registers: gen, OUT and IN. gen counts down by
// one every clock unless it is told to hold. A two-state controller runs it.
// In state "generate", when gen has even parity and its two low bits are
// zero, gen is copied into OUT and OUT's read/write bit is set, and the
// controller moves to "wait". In "wait", gen holds while the read/write bit
// is still set. Once the arbiter has taken the word, the bit is clear and the
// controller returns to "generate". The arbiter clears the read/write bit
// with its test-and-reset: the same cycle in which it enables OUT onto the
// shared bus. IN loads the bus when the arbiter says so.
//
// Interface: clk, rst_n; out_en (test-and-reset and output enable of OUT),
// in_load and bus[7:0] from the arbiter side. Outputs: out_rw (read/write
// bit of OUT), out_data[7:0], in_data[7:0], gen_q[7:0], wait_st (controller
// in "wait"). All registers change on the rising clock edge.
//
// The two states, their conditions and the register set follow the
// description. The condition is taken from the written expression: even
// parity and two low bits zero. The comment beside that expression reads
// differently. These are this design's choices: that gen counts down, the
// reset values (gen = 8'hFF, all else zero), and that a set read/write bit
// blocks a new OUT load.
module ex_comm_system (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       out_en,
  input  logic       in_load,
  input  logic [7:0] bus,
  output logic       out_rw,
  output logic [7:0] out_data,
  output logic [7:0] in_data,
  output logic [7:0] gen_q,
  output logic       wait_st
);
  typedef enum logic {GENERATE = 1'b0, WAIT = 1'b1} cstate_e;

  cstate_e st;
  logic    fire, gen_hold;

  assign fire     = (st == GENERATE) && !(^gen_q) && (gen_q[1:0] == 2'b00);
  assign gen_hold = (st == WAIT) && out_rw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= GENERATE;
      gen_q    <= 8'hFF;
      out_data <= '0;
      out_rw   <= 1'b0;
      in_data  <= '0;
    end else begin
      if (!gen_hold) gen_q <= gen_q - 8'd1;
      unique case (st)
        GENERATE: if (fire) st <= WAIT;
        WAIT:     if (!out_rw) st <= GENERATE;
      endcase
      if (fire) begin
        out_data <= gen_q;
        out_rw   <= 1'b1;
      end else if (out_en) begin
        out_rw   <= 1'b0;
      end
      if (in_load) in_data <= bus;
    end
  end

  assign wait_st = (st == WAIT);
endmodule
