// Test of the prefetcher inside the cache. Sequential runs make the fetcher
// prefetch the transfer block that follows the one in use. Random jumps stop
// prefetches half way (DemF3). Checked here:
//   - a prefetch asks the bus for a whole transfer block: word 0, Count 7,
//     at the transfer block address recorded for the fetch buffer;
//   - a completed prefetch writes the cache with all eight quads valid;
//   - a stopped prefetch writes only the quads that arrived, and Cancel
//     is raised to the bus unit for exactly that cycle;
//   - the prefetcher changes the LRU bits only when it replaces a block;
//   - all delivered quads are the memory's.
module tb_ic_prefetcher;
  `include "tb_icache_iu.svh"

  int n_pref = 0, n_full = 0, n_part = 0;

  always @(posedge clk) if (rst_n) begin
    check(bu_cancel == (demand_pre == 2'b11), "Cancel only in DemF3");
    if (bu_valid && demand_pre == 2'b01) begin
      n_pref++;
      check(word_of(bu_address) == 3'd0 && bu_count == 3'd7, "prefetch of a whole transfer block");
      check(tba_of(bu_address) == dut.fetch_ad, "prefetch address is the fetch buffer's");
    end
    if (dut.u_fetcher.u_pre.load_cache && dut.fstate != FC_DEMF) begin
      automatic tag_row_t r0 = dut.row_f;
      automatic tag_row_t nr = dut.new_row;
      automatic logic     w  = dut.u_fetcher.u_pre.way;
      automatic tba_t     t  = dut.fetch_ad;
      if (dut.fstate == FC_PREF) begin
        n_full++;
        check(dut.fb_valid == 8'hFF, "completed prefetch has all quads");
      end else begin
        n_part++;   // may still hold all eight when the last quad came with the stop
      end
      if (!dut.u_fetcher.u_pre.replace)
        check(nr.st0.lru == r0.st0.lru && nr.st1.lru == r0.st1.lru, "no LRU change without replacement");
      check(tb_valid(w ? nr.st1 : nr.st0, tb_of(t)) ==
            (dut.fb_valid | (dut.u_fetcher.u_pre.replace ? 8'h00 : tb_valid(w ? r0.st1 : r0.st0, tb_of(t)))),
            "data-valid bits of the prefetched quads");
    end
  end

  int l1, l2;
  qaddr_t a;

  initial begin
    start_env();
    for (int i = 0; i < 300; i++) begin
      a = {14'h0, 20'h0, 12'($urandom)};
      for (int k = 0; k < int'($urandom_range(12)); k++) request(a + qaddr_t'(2 * k), l1, l2);
    end
    check(n_pref > 20 && n_full > 10 && n_part > 5, "prefetches completed and stopped");
    $display("prefetches %0d, completed %0d, stopped %0d", n_pref, n_full, n_part);
    finish_test();
  end
endmodule
