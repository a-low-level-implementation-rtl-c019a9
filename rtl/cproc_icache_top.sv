// Top level: the C-processor instruction cache, with the hardware conversion
// examples beside it.
//
// The main design is the instruction cache (icache). The cache serves quad
// pairs to the instruction unit and fetches transfer blocks through the bus
// unit and MMU. Those two units are not part of this design, so the cache's
// bus-side signals are ports of the top. Next to the cache are the
// conversion examples, each with its own ports:
//   - an operator block with two functions;
//   - a three-state Mealy machine;
//   - the two-system bus communication design with its arbiter;
//   - the four kinds of signal semaphores;
//   - the two scan flip-flops;
//   - a PLA-controlled register.
// All clocked parts share clk and rst_n. The scan cells have their own
// clock pin CK and reset pin NRST, as their pin lists define.
//
// Interface: cache ports as in icache (prefix iu_ for the instruction
// unit, bu_ for the bus unit, ev_ for observation strobes). Example ports
// carry the prefix of their example. The grouping of the examples under one
// top is this design's choice. The examples do not interact with the cache.
module cproc_icache_top
  import icache_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // instruction cache: instruction unit side
  input  logic               iu_request,
  input  qaddr_t             iu_address,
  input  logic               iu_ack,
  output logic               iu_ready1,
  output logic               iu_ready2,
  output quad_t              iu_data_low,
  output quad_t              iu_data_high,
  // instruction cache: bus unit and MMU side
  output logic               bu_valid,
  output logic [COUNT_W-1:0] bu_count,
  output logic               bu_cancel,
  output qaddr_t             bu_address,
  input  quad_t              bu_data,
  input  logic               bu_ready,
  output logic [1:0]         demand_pre,
  output qaddr_t             pref_add,
  // instruction cache: event strobes
  output logic               ev_cache_hit,
  output logic               ev_fb_hit,
  output logic               ev_rb_hit,
  output logic               ev_wait,
  output logic               ev_start_fetcher,
  output logic               ev_bypass,
  output logic               ev_ram_refused,
  output logic               ev_tb_hit,
  output logic               ev_ram_pending,
  // operator example
  input  logic [1:0]         op_ctrl,
  input  logic               op_ready,
  input  logic [4:0]         op_in1,
  input  logic [4:0]         op_in2,
  output logic [6:0]         op_out,
  // Mealy machine example
  input  logic [1:0]         mealy_pi,
  output logic [1:0]         mealy_po,
  output logic [1:0]         mealy_state,
  // bus communication example
  output logic [7:0]         comm_bus,
  output logic [7:0]         comm_in1,
  output logic [7:0]         comm_in2,
  output logic               comm_xfer12,
  output logic               comm_xfer21,
  output logic               comm_prio2,
  output logic [7:0]         comm_gen1,
  output logic [7:0]         comm_gen2,
  output logic               comm_wait1,
  output logic               comm_wait2,
  // signal semaphores, index = kind (0 pulsed, 1 level, 2 level/pulsed, 3 pulse/level)
  input  logic [3:0]         sig_set,
  input  logic [3:0]         sig_reset,
  input  logic [3:0]         sig_pulse,
  output logic [3:0]         sig_q,
  // scan flip-flop
  input  logic               sff_TST,
  input  logic               sff_D,
  input  logic               sff_DT,
  input  logic               sff_CK,
  input  logic               sff_NRST,
  output logic               sff_Y,
  output logic               sff_NY,
  // scan flip-flop with enable
  input  logic               sfe_TST,
  input  logic               sfe_EN,
  input  logic               sfe_D,
  input  logic               sfe_DT,
  input  logic               sfe_CK,
  output logic               sfe_Q,
  output logic               sfe_NQ,
  // PLA-controlled register
  input  logic [7:0]         pla_ctrl,
  output logic [3:0]         pla_r
);

  icache u_icache (
    .clk, .rst_n,
    .iu_request, .iu_address, .iu_ack, .iu_ready1, .iu_ready2, .iu_data_low, .iu_data_high,
    .bu_valid, .bu_count, .bu_cancel, .bu_address, .bu_data, .bu_ready, .demand_pre, .pref_add,
    .ev_cache_hit, .ev_fb_hit, .ev_rb_hit, .ev_wait, .ev_start_fetcher, .ev_bypass,
    .ev_ram_refused, .ev_tb_hit, .ev_ram_pending
  );

  ex_operator u_operator (.ctrl(op_ctrl), .ready(op_ready), .in1(op_in1), .in2(op_in2), .out(op_out));

  ex_mealy u_mealy (.clk, .rst_n, .pi(mealy_pi), .po(mealy_po), .state(mealy_state));

  ex_comm u_comm (
    .clk, .rst_n, .bus(comm_bus), .in1_data(comm_in1), .in2_data(comm_in2),
    .xfer12(comm_xfer12), .xfer21(comm_xfer21), .prio2(comm_prio2),
    .gen1(comm_gen1), .gen2(comm_gen2), .wait1(comm_wait1), .wait2(comm_wait2)
  );

  for (genvar k = 0; k < 4; k++) begin : g_sig
    ex_signal #(.KIND(k), .LEVEL_INIT(1'b0)) u_sig (
      .clk, .rst_n, .set(sig_set[k]), .reset(sig_reset[k]), .pulse(sig_pulse[k]), .q(sig_q[k])
    );
  end

  ex_scan_ff u_scan_ff (
    .TST(sff_TST), .D(sff_D), .DT(sff_DT), .CK(sff_CK), .NRST(sff_NRST), .Y(sff_Y), .NY(sff_NY)
  );

  ex_scan_ff_en u_scan_ff_en (
    .TST(sfe_TST), .EN(sfe_EN), .D(sfe_D), .DT(sfe_DT), .CK(sfe_CK), .Q(sfe_Q), .NQ(sfe_NQ)
  );

  ex_pla_register u_pla (.clk, .rst_n, .ctrl(pla_ctrl), .r(pla_r));

endmodule
