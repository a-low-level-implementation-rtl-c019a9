// Self-checking testbench of the instruction cache at its full size.
//
// An instruction-unit driver issues requests for quad pairs: sequential runs
// (demand fetches followed by prefetches of the next transfer block), repeated
// runs (hits in the cache, read buffer and fetch buffer), and random addresses
// over a few tags that map onto the same sets (replacement, prefetches stopped
// by demand fetches). Every delivered quad is compared with the memory word of
// its address. A repeated request served from a buffer must answer in 3 cycles.
// Each mechanism is counted and must occur at least once.
module tb_icache;
  import icache_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

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

  icache dut (.*);

  tb_bus_unit_model #(.LATENCY(3), .GAPS(1'b1)) bus (
    .clk, .rst_n, .valid(bu_valid), .count(bu_count), .cancel(bu_cancel), .address(bu_address),
    .data(bu_data), .ready(bu_ready), .transfers, .cancels, .quads, .errors(bus_errors)
  );

  function automatic quad_t mem_word(qaddr_t a);
    return a[31:0] ^ {18'h0, a[45:32]} ^ 32'h5A00_0000;
  endfunction

  int checks = 0, failures = 0;
  int n_cache_hit = 0, n_fb_hit = 0, n_rb_hit = 0, n_wait = 0, n_demand = 0, n_prefetch = 0,
      n_demf3 = 0, n_replace = 0, n_bypass = 0, n_conflict = 0, n_tb_present = 0;
  logic [1:0] dp_q;

  // event counters
  always @(posedge clk) if (rst_n) begin
    if (ev_cache_hit) n_cache_hit++;
    if (ev_fb_hit) n_fb_hit++;
    if (ev_rb_hit) n_rb_hit++;
    if (ev_wait) n_wait++;
    if (ev_bypass) n_bypass++;
    if (dut.ram_rd && ev_ram_pending) n_conflict++;
    if (ev_tb_hit && iu_request && demand_pre == 2'b00) n_tb_present++;
    if (demand_pre == 2'b10 && dp_q != 2'b10) n_demand++;
    if (demand_pre == 2'b01 && dp_q != 2'b01) n_prefetch++;
    if (demand_pre == 2'b11 && dp_q != 2'b11) n_demf3++;
    if ((dut.u_fetcher.u_dem.load_cache && dut.u_fetcher.state == FC_DEMF && dut.u_fetcher.u_dem.replace) ||
        (dut.u_fetcher.u_pre.load_cache && dut.u_fetcher.state != FC_DEMF && dut.u_fetcher.u_pre.replace))
      n_replace++;
    dp_q <= demand_pre;
  end

  // bus protocol: Valid is a single-cycle pulse with a count up to the end of the transfer block
  always @(posedge clk) if (rst_n && bu_valid) begin
    checks++;
    if (int'(bu_count) + int'(word_of(bu_address)) != TB_QUADS - 1) begin
      failures++;
      $display("FAIL bus count %0d at address %h", bu_count, bu_address);
    end
  end

  task automatic request(qaddr_t a, output int lat);
    lat = 0;
    @(negedge clk);
    iu_request = 1'b1;
    iu_address = a;
    do begin
      @(negedge clk);
      lat++;
    end while (!iu_ready2 && lat < 2000);
    checks += 2;
    if (iu_data_low != mem_word(a)) begin
      failures++;
      $display("FAIL low  addr %h got %h exp %h", a, iu_data_low, mem_word(a));
    end
    if (iu_data_high != mem_word(a + 1)) begin
      failures++;
      $display("FAIL high addr %h got %h exp %h", a, iu_data_high, mem_word(a + 1));
    end
    iu_ack     = 1'b1;
    iu_request = 1'b0;
    @(negedge clk);
    iu_ack = 1'b0;
  endtask

  function automatic qaddr_t rand_addr();
    // four tags over four sets: more blocks than the two ways can hold
    qaddr_t a;
    a = '0;
    a[45:9] = 37'(32'h100 + $urandom_range(3) * 32'h1_0001);
    a[8:5]  = 4'($urandom_range(3));
    a[4:0]  = 5'($urandom_range(31));
    return a;
  endfunction

  int lat;
  qaddr_t a, base;

  initial begin
    iu_request = 0; iu_ack = 0; iu_address = '0; dp_q = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // sequential run, then the same run again
    base = qaddr_t'(46'h0_1234_0000);
    for (int pass = 0; pass < 3; pass++)
      for (int i = 0; i < 160; i += 2) request(base + qaddr_t'(i), lat);

    // immediate repeats must be served from a buffer in 3 cycles
    for (int i = 0; i < 40; i++) begin
      a = base + qaddr_t'($urandom_range(150));
      if (word_of(a) == 3'd7) a = a - 1;
      request(a, lat);
      request(a, lat);
      checks++;
      if (lat != 3) begin
        failures++;
        $display("FAIL repeat latency %0d for %h", lat, a);
      end
    end

    // random traffic over conflicting tags, with short sequential runs
    for (int i = 0; i < 1500; i++) begin
      a = rand_addr();
      for (int k = 0; k < int'($urandom_range(4)) + 1; k++) request(a + qaddr_t'(2 * k), lat);
    end

    checks++;
    if (bus_errors != 0) begin failures++; $display("FAIL bus unit saw Valid while busy"); end

    $display("events: cache_hit=%0d fb_hit=%0d rb_hit=%0d wait=%0d demand=%0d prefetch=%0d demf3=%0d cancel=%0d replace=%0d bypass=%0d conflict=%0d tb_present=%0d transfers=%0d quads=%0d",
             n_cache_hit, n_fb_hit, n_rb_hit, n_wait, n_demand, n_prefetch, n_demf3, cancels,
             n_replace, n_bypass, n_conflict, n_tb_present, transfers, quads);
    begin
      // the read bypass of the data RAM is reported but not required: a posted
      // write is normally drained before the server can ask for the same row
      int ev[11];
      ev = '{n_cache_hit, n_fb_hit, n_rb_hit, n_wait, n_demand, n_prefetch, n_demf3, int'(cancels),
             n_replace, n_conflict, n_tb_present};
      foreach (ev[i]) begin
        checks++;
        if (ev[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
