// Random test of the status register: the transfer-block addresses of the
// fetch and read buffers with their in-use flags, and the prefetch address
// (start of the transfer block after the current address).
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ic_status_reg;
  import icache_pkg::*;
  `include "tb_ic_buffers_common.svh"

  logic   fb_init, rb_load, fb_used, rb_used, m_fu, m_ru;
  tba_t   fb_tba, rb_tba, fetch_ad, read_ad, m_fa, m_ra;
  qaddr_t address, pref_ad;

  ic_status_reg dut (.clk, .rst_n, .fb_init, .fb_tba, .rb_load, .rb_tba, .address,
                     .fetch_ad, .read_ad, .fb_used, .rb_used, .pref_ad);

  initial begin
    fb_init = 0; rb_load = 0; fb_tba = '0; rb_tba = '0; address = '0;
    m_fu = 0; m_ru = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(fb_used == m_fu && rb_used == m_ru, "in-use flags");
      if (m_fu) check(fetch_ad == m_fa, "fetch address");
      if (m_ru) check(read_ad == m_ra, "read address");
      fb_init = ($urandom_range(3) == 0);
      rb_load = ($urandom_range(3) == 0);
      fb_tba  = {11'($urandom), $urandom};
      rb_tba  = {11'($urandom), $urandom};
      address = {14'($urandom), $urandom};
      if ($urandom_range(7) == 0) address = '1;
      #1;
      check(pref_ad == {address[ADDR_W-1:3] + 1'b1, 3'b000}, "prefetch address");
      @(posedge clk);
      if (fb_init) begin m_fu = 1; m_fa = fb_tba; end
      if (rb_load) begin m_ru = 1; m_ra = rb_tba; end
    end
    finish_test();
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    finish_test();
  end
endmodule
