// Bus communication example: two systems and an arbiter sharing one 8-bit bus.
//
// Each system produces words in its gen register and offers them in OUT.
// The arbiter moves one word per cycle over the shared bus into the other
// system's IN register, alternating priority. The shared bus is a
// multiplexer driven by the two output enables. Tri-state drivers are not
// used. The bus is zero when neither OUT is enabled.
//
// Interface: clk, rst_n in. Outputs for observation: the bus, the IN
// registers, a transfer strobe per direction (xfer12 = OUT1 to IN2,
// xfer21 = OUT2 to IN1), the arbiter state, both gen registers and both
// controllers' wait states.
//
// The structure follows the description. The multiplexed bus and the
// observation outputs are this design's choices.
module ex_comm (
  input  logic       clk,
  input  logic       rst_n,
  output logic [7:0] bus,
  output logic [7:0] in1_data,
  output logic [7:0] in2_data,
  output logic       xfer12,
  output logic       xfer21,
  output logic       prio2,
  output logic [7:0] gen1,
  output logic [7:0] gen2,
  output logic       wait1,
  output logic       wait2
);
  logic       rw1, rw2, en1, en2, load1, load2;
  logic [7:0] out1, out2;

  ex_comm_system u_sys1 (
    .clk, .rst_n, .out_en(en1), .in_load(load1), .bus,
    .out_rw(rw1), .out_data(out1), .in_data(in1_data), .gen_q(gen1), .wait_st(wait1)
  );

  ex_comm_system u_sys2 (
    .clk, .rst_n, .out_en(en2), .in_load(load2), .bus,
    .out_rw(rw2), .out_data(out2), .in_data(in2_data), .gen_q(gen2), .wait_st(wait2)
  );

  ex_comm_arbiter u_arb (
    .clk, .rst_n, .rw1, .rw2, .en1, .en2, .load1, .load2, .prio2
  );

  assign bus    = en1 ? out1 : (en2 ? out2 : 8'h00);
  assign xfer12 = en1;
  assign xfer21 = en2;
endmodule
