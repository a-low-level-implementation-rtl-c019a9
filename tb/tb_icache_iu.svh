// Shared environment of the cache-level unit testbenches: clock, reset,
// the cache instance "dut", the bus unit model "bus", the memory contents
// (mem_word) and an instruction-unit request task that checks both
// returned quads. The including module adds its own monitors and workload.
// The request and acknowledge sequence follows the original instruction-unit
// signals; the cycle-level handshake is this design's choice.
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
  int checks = 0, failures = 0;

  icache dut (.*);

  tb_bus_unit_model #(.LATENCY(3), .GAPS(1'b1)) bus (
    .clk, .rst_n, .valid(bu_valid), .count(bu_count), .cancel(bu_cancel), .address(bu_address),
    .data(bu_data), .ready(bu_ready), .transfers, .cancels, .quads, .errors(bus_errors)
  );

  function automatic quad_t mem_word(qaddr_t a);
    return a[31:0] ^ {18'h0, a[45:32]} ^ 32'h5A00_0000;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One quad-pair request. lat1/lat2: cycles from the request to Ready1/Ready2.
  task automatic request(qaddr_t a, output int lat1, output int lat2);
    int n;
    n = 0; lat1 = 0; lat2 = 0;
    @(negedge clk);
    iu_request = 1'b1;
    iu_address = a;
    do begin
      @(negedge clk);
      n++;
      if (iu_ready1 && lat1 == 0) begin
        lat1 = n;
        check(iu_data_low == mem_word(a), "low quad");
      end
    end while (!iu_ready2 && n < 2000);
    lat2 = n;
    check(iu_ready1, "Ready1 held with Ready2");
    check(iu_data_low == mem_word(a), "low quad");
    check(iu_data_high == mem_word(a + 1), "high quad");
    iu_ack     = 1'b1;
    iu_request = 1'b0;
    @(negedge clk);
    iu_ack = 1'b0;
  endtask

  task automatic start_env();
    iu_request = 0; iu_ack = 0; iu_address = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  endtask

  task automatic finish_test();
    check(bus_errors == 0, "bus unit protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
