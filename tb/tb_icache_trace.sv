// Trace workload for the instruction cache, set up like the cache's original
// functional test bench.
//
// A trace of 7168 quad-pair requests (46-bit addresses, a 13-bit trace
// counter) is replayed through the cache. Main memory is 2048 words. The test
// address decoder keeps the low 11 bits of an address, and each memory word
// holds its own address. So the data returned for quad address a must equal
// a[10:0]. A compare block checks both quads whenever the instruction unit
// acknowledges them. A 32-bit clock counter ("Teller") numbers the cycles, and
// the cycle number of every mismatch is pushed into an 8-entry error FIFO.
//
// The original trace contents are not available, so the trace is generated
// here as a program-like stream. Mostly it runs straight through in quad
// pairs. Short backward branches form loops, and now and then it jumps
// elsewhere in the 2048-word image. The upper address bits take one of four
// values, so different tags compete for the same sets. The image is twice the
// cache size, which forces replacements. The test also checks that demand
// fetches, prefetches, stopped prefetches, cache hits and buffer hits all
// occur, and reports the mean cycles per request.
// The trace length, memory size, address decoder, compare, clock counter and
// error FIFO follow the original test set-up; the trace itself is this
// testbench's own.
module tb_icache_trace;
  import icache_pkg::*;

  localparam int TRACE_LEN = 7168;
  localparam int MEM_AW    = 11;

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
  int checks = 0, failures = 0;

  icache dut (.*);

  tb_bus_unit_model #(.LATENCY(3), .GAPS(1'b0), .MEM_AW(MEM_AW)) bus (
    .clk, .rst_n, .valid(bu_valid), .count(bu_count), .cancel(bu_cancel), .address(bu_address),
    .data(bu_data), .ready(bu_ready), .transfers, .cancels, .quads, .errors(bus_errors)
  );

  // Trace and its counter.
  qaddr_t      trace [TRACE_LEN];
  logic [12:0] counter;

  // Clock counter and error FIFO.
  logic [31:0] teller;
  logic [31:0] error_fifo [8];
  int          error_cnt = 0;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) teller <= '0;
    else        teller <= teller + 1;

  int n_hit = 0, n_fb = 0, n_rb = 0, n_start = 0, n_pref = 0, n_demf3 = 0;
  logic [1:0] dp_q;
  always @(posedge clk) begin
    if (rst_n) begin
      n_hit   += int'(ev_cache_hit);
      n_fb    += int'(ev_fb_hit);
      n_rb    += int'(ev_rb_hit);
      n_start += int'(ev_start_fetcher);
      n_pref  += int'(demand_pre == 2'b01 && dp_q != 2'b01);
      n_demf3 += int'(demand_pre == 2'b11);
    end
    dp_q <= demand_pre;
  end

  function automatic quad_t rom(qaddr_t a);
    return quad_t'(a[MEM_AW-1:0]);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (error_cnt < 8) error_fifo[error_cnt] = teller;
      error_cnt++;
      $display("FAIL %s at clock %0d", what, teller);
    end
  endtask

  // Program-like address stream over the 2048-word image.
  task automatic make_trace();
    logic [MEM_AW-1:0] pc;
    logic [1:0]        seg;
    int                r;
    pc  = '0;
    seg = '0;
    for (int i = 0; i < TRACE_LEN; i++) begin
      trace[i] = (qaddr_t'(seg) << 30) | qaddr_t'(pc);
      r = int'($urandom_range(99));
      if (r < 80)      pc = pc + 2;                                   // straight line
      else if (r < 92) pc = pc - MEM_AW'($urandom_range(40, 2));      // loop back
      else if (r < 98) pc = MEM_AW'($urandom);                        // jump
      else begin                                                      // other segment
        pc  = MEM_AW'($urandom);
        seg = 2'($urandom);
      end
    end
  endtask

  int total_cycles = 0;

  task automatic request(qaddr_t a);
    int n;
    n = 0;
    @(negedge clk);
    iu_request = 1'b1;
    iu_address = a;
    do begin
      @(negedge clk);
      n++;
    end while (!iu_ready2 && n < 2000);
    total_cycles += n;
    check(iu_ready2, "request answered");
    // Compare: only when the instruction unit takes the data.
    iu_ack     = 1'b1;
    iu_request = 1'b0;
    check(iu_data_low == rom(a), "low quad");
    check(iu_data_high == rom(a + 1), "high quad");
    @(negedge clk);
    iu_ack = 1'b0;
  endtask

  initial begin
    iu_request = 0; iu_ack = 0; iu_address = '0;
    make_trace();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < TRACE_LEN; i++) begin
      counter = 13'(i);
      request(trace[counter]);
    end
    repeat (20) @(negedge clk);
    check(bus_errors == 0, "bus unit protocol");
    check(n_hit > 0,   "cache hits occur");
    check(n_fb > 0,    "fetch buffer hits occur");
    check(n_rb > 0,    "read buffer hits occur");
    check(n_start > 0, "demand fetches occur");
    check(n_pref > 0,  "prefetches occur");
    check(n_demf3 > 0, "stopped prefetches occur");
    $display("trace: %0d requests, %0d clocks, %0d.%02d clocks per request",
             TRACE_LEN, teller, total_cycles / TRACE_LEN, (total_cycles * 100 / TRACE_LEN) % 100);
    $display("cache hits %0d, fetch buffer hits %0d, read buffer hits %0d",
             n_hit, n_fb, n_rb);
    $display("demand fetches %0d, prefetches %0d, stopped prefetches %0d, bus transfers %0d",
             n_start, n_pref, n_demf3, transfers);
    for (int e = 0; e < 8 && e < error_cnt; e++)
      $display("error FIFO[%0d] = clock %0d", e, error_fifo[e]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
