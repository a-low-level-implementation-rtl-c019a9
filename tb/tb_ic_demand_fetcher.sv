// Test of the demand fetcher inside the cache. Requests jump to cold
// addresses, with a random word offset, so that most of them miss and
// start a demand fetch. Checked here:
//   - the bus request of a demand fetch starts at the missing quad and asks
//     for the quads up to the end of its transfer block (Count = 7 - word);
//   - when the demand fetch writes the cache, the fetch buffer holds exactly
//     the quads from the first fetched one to the end of the transfer block;
//   - after the write, the tag/status row has that way's tag, its block valid
//     bit and those data-valid bits, and the written way is most recently used;
//   - all delivered quads are the memory's.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ic_demand_fetcher;
  `include "tb_icache_iu.svh"

  int n_dem = 0, n_wr = 0;

  always @(posedge clk) if (rst_n) begin
    if (bu_valid && demand_pre == 2'b10) begin
      n_dem++;
      check(bu_address == dut.target, "demand fetch starts at the missing quad");
      check(int'(bu_count) == 7 - int'(word_of(bu_address)), "demand fetch count");
    end
    if (dut.u_fetcher.u_dem.load_cache && dut.fstate == FC_DEMF) begin
      automatic logic [2:0] fw  = dut.u_fetcher.u_dem.first_word;
      automatic tba_t       t   = dut.fetch_ad;
      automatic logic       w   = dut.u_fetcher.u_dem.way;
      automatic logic [7:0] exp = 8'hFF << fw;
      n_wr++;
      check(dut.fb_valid == exp, "fetch buffer holds the fetched quads");
      @(negedge clk);
      begin
        automatic tag_row_t r = dut.u_tags.mem[set_of(t)];
        automatic status_t  s = w ? r.st1 : r.st0;
        check((w ? r.tag1 : r.tag0) == tag_of(t) && s.bvalid, "tag and block valid written");
        check((tb_valid(s, tb_of(t)) & exp) == exp, "data-valid bits written");
        check(!s.lru && (w ? r.st0.lru : r.st1.lru), "written way most recently used");
      end
    end
  end

  int l1, l2;
  qaddr_t a;

  initial begin
    start_env();
    for (int i = 0; i < 400; i++) begin
      a = {14'h0, 32'($urandom)};
      request(a, l1, l2);
      if (1'($urandom_range(1)) == 0) request(a + 2, l1, l2);
    end
    check(n_dem > 50 && n_wr > 50, "demand fetches happened");
    $display("demand fetches %0d, cache writes %0d", n_dem, n_wr);
    finish_test();
  end
endmodule
