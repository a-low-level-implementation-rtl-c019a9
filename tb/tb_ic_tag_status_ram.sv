// Random test of the tag/status memory. Random full-row writes and LRU
// touches go to random sets while both read ports look at random sets. The
// read rows are compared with a model array. When a write and a touch hit
// the same set in one cycle, the touch decides the LRU bits.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ic_tag_status_ram;
  import icache_pkg::*;
  `include "tb_ic_buffers_common.svh"

  set_t     set_f, set_s, wset, tset;
  tag_row_t row_f, row_s, wrow;
  logic     we, touch, tway;
  tag_row_t model [SETS];
  int n_both = 0;

  ic_tag_status_ram dut (.clk, .rst_n, .set_f, .row_f, .set_s, .row_s, .we, .wset, .wrow, .touch, .tset, .tway);

  initial begin
    we = 0; touch = 0; set_f = 0; set_s = 0; wset = 0; tset = 0; wrow = '0; tway = 0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      set_f = 4'($urandom); set_s = 4'($urandom);
      #1;
      check(row_f == model[set_f], "fetcher port");
      check(row_s == model[set_s], "server port");
      we    = 1'($urandom_range(1));
      touch = 1'($urandom_range(1));
      wset  = 4'($urandom);
      tset  = ($urandom_range(3) == 0) ? wset : 4'($urandom);
      tway  = 1'($urandom_range(1));
      wrow  = $bits(tag_row_t)'({$urandom, $urandom, $urandom, $urandom, $urandom});
      @(posedge clk);
      if (we) model[wset] = wrow;
      if (touch) begin model[tset].st0.lru = tway; model[tset].st1.lru = !tway; end
      if (we && touch && wset == tset) n_both++;
    end
    check(n_both > 0, "write and touch together");
    finish_test();
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    finish_test();
  end
endmodule
