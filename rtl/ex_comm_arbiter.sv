// Arbiter of the bus communication example: a Moore-style controller with
// the two states Prio1 and Prio2.
//
// Each cycle the arbiter tests the read/write bits of the two OUT registers.
// The system that has priority is tested first. When its bit is set, that
// OUT is enabled onto the shared bus, the other system's IN is loaded, and
// priority passes to the other system. Otherwise, if the other system's bit
// is set, that system is served and priority stays. The enable also acts as
// the test-and-reset of the read/write bit.
//
// Interface: clk, rst_n, rw1, rw2 in; en1, en2 (output enable and bit reset
// of OUT1/OUT2), load1, load2 (IN1/IN2 load), prio2 (state) out. The enables
// are combinational from the state and the bits; the state changes on the
// rising clock edge.
//
// The states, test order and actions follow the description. The reset
// state Prio1 is this design's choice.
module ex_comm_arbiter (
  input  logic clk,
  input  logic rst_n,
  input  logic rw1,
  input  logic rw2,
  output logic en1,
  output logic en2,
  output logic load1,
  output logic load2,
  output logic prio2
);
  typedef enum logic {PRIO1 = 1'b0, PRIO2 = 1'b1} astate_e;

  astate_e st;

  always_comb begin
    if (st == PRIO1) begin
      en1 = rw1;
      en2 = !rw1 && rw2;
    end else begin
      en2 = rw2;
      en1 = !rw2 && rw1;
    end
    load2 = en1;
    load1 = en2;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                    st <= PRIO1;
    else if (st == PRIO1 && en1)   st <= PRIO2;
    else if (st == PRIO2 && en2)   st <= PRIO1;

  assign prio2 = (st == PRIO2);
endmodule
