// Test of the server inside the cache. The server decides, per requested
// quad, between fetch buffer, read buffer, cache, waiting for the fetcher
// and starting a demand fetch. Checked here:
//   - every delivered quad pair is the memory's;
//   - Ready1 comes strictly before Ready2 and both stay until Acknowledge;
//   - a repeated pair served from the buffers takes 2 cycles to Ready1 and 3
//     to Ready2 (a repeat may also find its transfer block moved to the cache,
//     when the fetch buffer was handed to a new fetch);
//   - a pair with a cache hit and no waiting gets Ready2 after 5 cycles, or
//     after 7 when both quads come from the cache (RAM read and read buffer
//     load cost two cycles per hit) and touches the LRU bits of its set,
//     so the hit way becomes most recently used;
//   - StartFetcher is raised only for a quad that is nowhere in the cache.
// Each kind of lookup must occur.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ic_server;
  `include "tb_icache_iu.svh"

  int n_fb = 0, n_rb = 0, n_ch = 0, n_wait = 0, n_sf = 0;
  int n_ch5 = 0, n_buf3 = 0;
  logic saw_slow, saw_ch;   // per request: a wait, fetch or refusal / a cache hit

  always @(posedge clk) if (rst_n) begin
    n_fb += ev_fb_hit; n_rb += ev_rb_hit; n_ch += ev_cache_hit; n_wait += ev_wait; n_sf += ev_start_fetcher;
    if (ev_wait || ev_start_fetcher || ev_ram_refused) saw_slow = 1'b1;
    if (ev_cache_hit) saw_ch = 1'b1;
    if (ev_start_fetcher) check(!ev_cache_hit && !ev_fb_hit && !ev_rb_hit, "StartFetcher only on a miss");
    if (dut.touch) begin
      automatic set_t s = dut.set_s;
      automatic logic w = dut.tway;
      @(negedge clk);
      check(dut.u_tags.mem[s].st0.lru == w && dut.u_tags.mem[s].st1.lru == !w, "LRU touch on a cache hit");
    end
  end

  int l1, l2;
  qaddr_t a, base;

  initial begin
    saw_slow = 0; saw_ch = 0;
    start_env();
    base = 46'h0_00AB_C000;
    for (int i = 0; i < 600; i++) begin
      a = base + qaddr_t'($urandom_range(511));
      request(a, l1, l2);
      check(l1 >= 2 && l1 < l2, "Ready1 before Ready2");
      if (word_of(a) != 3'd7) begin
        saw_slow = 0; saw_ch = 0;
        request(a, l1, l2);
        if (!saw_ch && !saw_slow) begin
          check(l1 == 2 && l2 == 3, "buffer hit latency");
          n_buf3++;
        end
      end
      // a quad pair from another transfer block of the same cached block
      if (i > 300 && 1'($urandom_range(1)) == 0) begin
        saw_slow = 0; saw_ch = 0;
        request(a ^ 46'h8, l1, l2);
        if (saw_ch && !saw_slow) begin
          check(l2 == 5 || l2 == 7, "cache hit latency");
          n_ch5 += (l2 == 5);
        end
      end
    end
    check(n_fb > 0 && n_rb > 0 && n_ch > 0 && n_wait > 0 && n_sf > 0 && n_ch5 > 0 && n_buf3 > 0, "every lookup kind occurred");
    $display("fb=%0d rb=%0d cache=%0d wait=%0d start=%0d", n_fb, n_rb, n_ch, n_wait, n_sf);
    finish_test();
  end
endmodule
