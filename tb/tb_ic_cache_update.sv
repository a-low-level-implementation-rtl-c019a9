// Random test of the tag/status row update made after a fetch, for both
// settings of TOUCH_LRU (demand fetcher and prefetcher). Rows are random,
// with tags often equal to the fetched tag and valid bits often clear, so
// that hits in either way, free ways and LRU replacement all occur. The new
// row, the way, the replace flag and the data RAM address are compared with
// an independent model.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ic_cache_update;
  import icache_pkg::*;

  tba_t                tba;
  tag_row_t            row, nr_t, nr_p;
  logic [TB_QUADS-1:0] mask;
  logic                way_t, way_p, rep_t, rep_p;
  logic [RAM_AW-1:0]   addr_t, addr_p;
  int checks = 0, failures = 0;
  int n_hit = 0, n_free = 0, n_lru = 0;

  ic_cache_update #(.TOUCH_LRU(1'b1)) dut_t (.tba, .row, .mask, .new_row(nr_t), .way(way_t), .replace(rep_t), .ram_addr(addr_t));
  ic_cache_update #(.TOUCH_LRU(1'b0)) dut_p (.tba, .row, .mask, .new_row(nr_p), .way(way_p), .replace(rep_p), .ram_addr(addr_p));

  function automatic tag_t rtag(tag_t t);
    return ($urandom_range(2) == 0) ? t : {5'($urandom), $urandom};
  endfunction

  task automatic check_one(bit touch, tag_row_t got, logic gway, logic grep, logic [RAM_AW-1:0] gaddr);
    tag_row_t e;
    status_t  s [2];
    tag_t     tg [2];
    logic     h [2];
    logic     w, rep;
    int       base;
    tg[0] = row.tag0; tg[1] = row.tag1; s[0] = row.st0; s[1] = row.st1;
    for (int k = 0; k < 2; k++) h[k] = s[k].bvalid && tg[k] == tba[TBA_W-1:6];
    rep = !(h[0] || h[1]);
    if (h[0]) w = 0;
    else if (h[1]) w = 1;
    else if (!s[0].bvalid) w = 0;
    else if (!s[1].bvalid) w = 1;
    else w = s[1].lru;
    if (rep) begin tg[w] = tba[TBA_W-1:6]; s[w].bvalid = 1; s[w].dvalid = '0; end
    base = int'(tba[1:0]) * 8;
    for (int q = 0; q < 8; q++) if (mask[q]) s[w].dvalid[base + q] = 1'b1;
    if (touch || rep) begin s[0].lru = w; s[1].lru = !w; end
    e = '{tag1: tg[1], tag0: tg[0], st1: s[1], st0: s[0]};
    checks += 4;
    if (got != e)    begin failures++; $display("FAIL row touch=%0d", touch); end
    if (gway != w)   begin failures++; $display("FAIL way touch=%0d", touch); end
    if (grep != rep) begin failures++; $display("FAIL replace touch=%0d", touch); end
    if (gaddr != {tba[5:2], w, tba[1:0]}) begin failures++; $display("FAIL ram address"); end
    if (touch) begin
      if (!rep) n_hit++;
      else if (!(row.st0.bvalid && row.st1.bvalid)) n_free++;
      else n_lru++;
    end
  endtask

  initial begin
    for (int i = 0; i < 5000; i++) begin
      tba = {5'($urandom), $urandom, 6'($urandom)};
      row.tag0 = rtag(tba[TBA_W-1:6]);
      row.tag1 = rtag(tba[TBA_W-1:6]);
      row.st0  = {1'($urandom), 1'($urandom_range(3) != 0), $urandom};
      row.st1  = {!row.st0.lru, 1'($urandom_range(3) != 0), $urandom};
      mask     = 8'($urandom);
      #1;
      check_one(1'b1, nr_t, way_t, rep_t, addr_t);
      check_one(1'b0, nr_p, way_p, rep_p, addr_p);
    end
    checks++;
    if (n_hit == 0 || n_free == 0 || n_lru == 0) begin
      failures++;
      $display("FAIL a way choice never happened: hit=%0d free=%0d lru=%0d", n_hit, n_free, n_lru);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
