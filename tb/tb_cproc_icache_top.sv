// End-to-end test of the whole top level at its default size.
//
// The instruction cache runs a mixed instruction-unit workload against the
// bus unit model: sequential runs, repeats and random jumps over
// conflicting tags. Every quad pair is compared with memory. At the same
// time the conversion examples are driven and checked against small models:
// the operator, the Mealy machine, the bus communication pair, the signal
// semaphores, both scan flip-flops and the PLA register.
//
// Each mechanism is counted and must happen at least once:
// cache hit, fetch-buffer hit, read-buffer hit, server wait, demand fetch,
// prefetch, stopped prefetch (DemF3) with Cancel, block replacement, server
// read while a fetcher write is pending, a prefetched transfer block found
// present (TransferBlockHit), both operator functions, every Mealy state,
// communication in both directions, a pulse overriding a level, a scan
// capture, a held PLA register and a loaded PLA register.
// The mechanisms counted follow the original design; the instruction streams
// and the reference models are this testbench's own.
module tb_cproc_icache_top;
  import icache_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // cache
  logic               iu_request, iu_ack, iu_ready1, iu_ready2;
  qaddr_t             iu_address;
  quad_t              iu_data_low, iu_data_high;
  logic               bu_valid, bu_cancel, bu_ready;
  logic [COUNT_W-1:0] bu_count;
  qaddr_t             bu_address, pref_add;
  quad_t              bu_data;
  logic [1:0]         demand_pre;
  logic ev_cache_hit, ev_fb_hit, ev_rb_hit, ev_wait, ev_start_fetcher, ev_bypass,
        ev_ram_refused, ev_tb_hit, ev_ram_pending;
  int unsigned transfers, cancels, quads, bus_errors;
  // examples
  logic [1:0] op_ctrl, mealy_pi, mealy_po, mealy_state;
  logic       op_ready;
  logic [4:0] op_in1, op_in2;
  logic [6:0] op_out;
  logic [7:0] comm_bus, comm_in1, comm_in2, comm_gen1, comm_gen2;
  logic       comm_xfer12, comm_xfer21, comm_prio2, comm_wait1, comm_wait2;
  logic [3:0] sig_set, sig_reset, sig_pulse, sig_q;
  logic       sff_TST, sff_D, sff_DT, sff_CK, sff_NRST, sff_Y, sff_NY;
  logic       sfe_TST, sfe_EN, sfe_D, sfe_DT, sfe_CK, sfe_Q, sfe_NQ;
  logic [7:0] pla_ctrl;
  logic [3:0] pla_r;

  cproc_icache_top dut (.*);

  tb_bus_unit_model #(.LATENCY(3), .GAPS(1'b1)) bus (
    .clk, .rst_n, .valid(bu_valid), .count(bu_count), .cancel(bu_cancel), .address(bu_address),
    .data(bu_data), .ready(bu_ready), .transfers, .cancels, .quads, .errors(bus_errors)
  );

  assign sff_CK = clk;
  assign sfe_CK = clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic quad_t mem_word(qaddr_t a);
    return a[31:0] ^ {18'h0, a[45:32]} ^ 32'h5A00_0000;
  endfunction

  // ---------------------------------------------------------------- counters
  typedef enum int {
    M_CACHE_HIT, M_FB_HIT, M_RB_HIT, M_WAIT, M_DEMAND, M_PREFETCH, M_DEMF3, M_CANCEL,
    M_REPLACE, M_RAM_CONFLICT, M_TB_PRESENT, M_OP_DEFAULT, M_OP_GENERATE, M_MEALY_A,
    M_MEALY_B, M_MEALY_C, M_COMM_12, M_COMM_21, M_PULSE_OVER_LEVEL, M_SCAN, M_PLA_HOLD,
    M_PLA_LOAD, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  logic [1:0] dp_q;

  always @(posedge clk) if (rst_n) begin
    mech[M_CACHE_HIT] += ev_cache_hit;
    mech[M_FB_HIT]    += ev_fb_hit;
    mech[M_RB_HIT]    += ev_rb_hit;
    mech[M_WAIT]      += ev_wait;
    mech[M_RAM_CONFLICT] += (dut.u_icache.ram_rd && ev_ram_pending);
    mech[M_TB_PRESENT]   += (ev_tb_hit && iu_request && demand_pre == 2'b00);
    mech[M_DEMAND]    += (demand_pre == 2'b10 && dp_q != 2'b10);
    mech[M_PREFETCH]  += (demand_pre == 2'b01 && dp_q != 2'b01);
    mech[M_DEMF3]     += (demand_pre == 2'b11);
    mech[M_CANCEL]    += bu_cancel;
    mech[M_REPLACE]   += (dut.u_icache.load_cache &&
                          (dut.u_icache.fstate == FC_DEMF ? dut.u_icache.u_fetcher.u_dem.replace
                                                          : dut.u_icache.u_fetcher.u_pre.replace));
    mech[M_MEALY_A + int'(mealy_state)]++;
    mech[M_COMM_12]   += comm_xfer12;
    mech[M_COMM_21]   += comm_xfer21;
    dp_q <= demand_pre;
  end

  // ---------------------------------------------------------------- cache
  task automatic request(qaddr_t a);
    int n = 0;
    @(negedge clk);
    iu_request = 1'b1;
    iu_address = a;
    do begin
      @(negedge clk);
      n++;
    end while (!iu_ready2 && n < 2000);
    check(iu_data_low == mem_word(a) && iu_data_high == mem_word(a + 1), "quad pair from memory");
    iu_ack     = 1'b1;
    iu_request = 1'b0;
    @(negedge clk);
    iu_ack = 1'b0;
  endtask

  function automatic qaddr_t rand_addr();
    qaddr_t a = '0;
    a[45:9] = 37'(32'h200 + $urandom_range(3) * 32'h3_0001);
    a[8:5]  = 4'($urandom_range(3));
    a[4:0]  = 5'($urandom_range(31));
    return a;
  endfunction

  bit cache_done = 0;

  initial begin : cache_traffic
    qaddr_t a;
    iu_request = 0; iu_ack = 0; iu_address = '0; dp_q = '0;
    wait (rst_n);
    for (int pass = 0; pass < 2; pass++)
      for (int i = 0; i < 96; i += 2) request(46'h0_0777_0000 + qaddr_t'(i));
    for (int i = 0; i < 500; i++) begin
      a = rand_addr();
      for (int k = 0; k < int'($urandom_range(4)) + 1; k++) request(a + qaddr_t'(2 * k));
    end
    check(bus_errors == 0, "bus unit protocol");
    cache_done = 1;
  end

  // ---------------------------------------------------------------- examples
  localparam logic [3:0] MEALY [3][3] = '{
    '{4'b10_00, 4'b01_01, 4'b10_10},
    '{4'b10_01, 4'b00_00, 4'b01_01},
    '{4'b00_10, 4'b01_10, 4'b10_00}
  };

  // minimized cover of the PLA terms: {any term matched, OR of the values}
  function automatic bit pla_match(logic [7:0] c, string pat);
    for (int b = 0; b < 8; b++)
      if (pat[b] != "x" && c[7 - b] != (pat[b] == "1")) return 0;
    return 1;
  endfunction

  function automatic logic [4:0] pla_cover(logic [7:0] c);
    string      pat [7] = '{"x0000001", "100x0001", "1001x001", "100100xx", "011000xx", "x11xx00x", "xxxx11x0"};
    logic [3:0] val [7] = '{4'b0001, 4'b0010, 4'b0011, 4'b1111, 4'b1101, 4'b1001, 4'b0111};
    logic [4:0] r = '0;
    for (int t = 0; t < 7; t++) if (pla_match(c, pat[t])) r = r | {1'b1, val[t]};
    return r;
  endfunction

  initial begin : examples
    logic [1:0] ms;
    logic       sl3, sp, sff_m, sfe_m;
    logic [3:0] pla_m;
    logic [6:0] op_exp;
    op_ctrl = 0; op_ready = 0; op_in1 = 0; op_in2 = 0;
    mealy_pi = 2'b11; sig_set = 0; sig_reset = 0; sig_pulse = 0;
    sff_TST = 1; sff_D = 0; sff_DT = 0; sff_NRST = 0;
    sfe_TST = 1; sfe_EN = 0; sfe_D = 0; sfe_DT = 0; pla_ctrl = 0;
    ms = 0; sl3 = 0; sp = 0; sff_m = 0; sfe_m = 0; pla_m = 0;
    repeat (3) @(negedge clk);
    sff_NRST = 1;
    wait (rst_n);
    @(negedge clk);
    while (!cache_done) begin
      // operator (combinational)
      op_ctrl = 2'($urandom); op_ready = 1'($urandom_range(1)); op_in1 = 5'($urandom);
      op_in2 = ($urandom_range(3) == 0) ? 5'd5 : 5'($urandom);
      // inputs of the clocked examples
      mealy_pi  = 2'($urandom_range(2));
      sig_set   = {$urandom_range(5) == 0, 3'b000};
      sig_reset = {$urandom_range(5) == 0, 3'b000};
      sig_pulse = {$urandom_range(2) == 0, 3'b000};
      sff_TST = 1'($urandom_range(1)); sff_D = 1'($urandom_range(1)); sff_DT = 1'($urandom_range(1));
      sfe_TST = ($urandom_range(3) == 0); sfe_EN = 1'($urandom_range(1)); sfe_D = 1'($urandom_range(1));
      sfe_DT = 1'($urandom_range(1));
      pla_ctrl = (1'($urandom_range(1)) == 0) ? 8'b1001_0011 : 8'($urandom);
      #1;
      if (op_ctrl == 2'b00) begin
        op_exp = {op_in2[1:0], op_ready ? op_in1 + 5'd1 : op_in1};
        mech[M_OP_DEFAULT]++;
      end else begin
        op_exp = {(op_in2 == 5'd5) ? 5'b00001 : 5'b11111, op_in2[1:0]};
        mech[M_OP_GENERATE]++;
      end
      check(op_out == op_exp, "operator output");
      if (!(ms == 2 && mealy_pi == 2'b10)) check(mealy_po == MEALY[ms][mealy_pi][1:0], "Mealy output");
      @(negedge clk);
      // models after the clock edge
      if (!(ms == 2 && mealy_pi == 2'b10)) ms = MEALY[ms][mealy_pi][3:2];
      mech[M_PULSE_OVER_LEVEL] += (sig_pulse[3] && sl3 && !sig_set[3]);
      sp = sig_pulse[3];
      if (sig_set[3]) sl3 = 1; else if (sig_reset[3] || sig_pulse[3]) sl3 = 0;
      sff_m = sff_TST ? sff_DT : sff_D;
      mech[M_SCAN] += sff_TST;
      sfe_m = sfe_TST ? sfe_DT : (sfe_EN ? sfe_D : sfe_m);
      begin
        logic [4:0] cv;
        cv = pla_cover(pla_ctrl);
        if (cv[4]) begin pla_m = cv[3:0]; mech[M_PLA_LOAD]++; end
        else mech[M_PLA_HOLD]++;
      end
      check(mealy_state == ms, "Mealy state");
      check(sig_q[3] == (sp | sl3), "pulse/level signal");
      check(sff_Y == sff_m && sff_NY == !sff_m, "scan flip-flop");
      check(sfe_Q == sfe_m && sfe_NQ == !sfe_m, "scan flip-flop with enable");
      check(pla_r == pla_m, "PLA register");
    end
  end

  // communication: every word offered must cross the bus unchanged
  logic [7:0] q12 [$], q21 [$];
  always @(posedge clk) if (rst_n) begin
    if (dut.u_comm.u_sys1.fire) q12.push_back(comm_gen1);
    if (dut.u_comm.u_sys2.fire) q21.push_back(comm_gen2);
    if (comm_xfer12) check(q12.size() > 0 && comm_bus == q12.pop_front(), "word 1 to 2 on the bus");
    if (comm_xfer21) check(q21.size() > 0 && comm_bus == q21.pop_front(), "word 2 to 1 on the bus");
  end

  // ---------------------------------------------------------------- end
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (cache_done);
    repeat (5) @(negedge clk);
    $display("transfers %0d, quads %0d, bus cancels %0d", transfers, quads, cancels);
    for (int m = 0; m < M_COUNT; m++) begin
      $display("%-20s %0d", mech_e'(m), mech[m]);
      check(mech[m] > 0, "mechanism happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
