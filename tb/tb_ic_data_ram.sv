// Random test of the data RAM with its arbiter. The fetcher posts masked
// writes and the server reads, both at random and often to the same few
// rows. The testbench models what a read must return: every quad written by
// an accepted fetcher write, even one still held in the pending register. It
// also models the grant rule: the server is refused only when a write is
// pending and a new one arrives in the same cycle. Read data is checked one
// cycle after a granted read. Refusals, bypassed reads and posted writes
// must all occur.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ic_data_ram;
  import icache_pkg::*;
  `include "tb_ic_buffers_common.svh"

  logic                srv_rd, srv_gnt, f_wr, pending, bypass;
  logic [RAM_AW-1:0]   srv_addr, f_addr;
  logic [TB_QUADS-1:0] f_mask;
  logic [TBLK_W-1:0]   f_data, rd_data, exp_data;
  logic [TB_QUADS-1:0] exp_known;
  quad_t               model [RAM_DEPTH][TB_QUADS];
  logic [TB_QUADS-1:0] written [RAM_DEPTH];
  logic                m_pend, do_chk;
  int n_ref = 0, n_byp = 0, n_pend = 0;

  ic_data_ram dut (.clk, .rst_n, .srv_rd, .srv_addr, .srv_gnt, .rd_data,
                   .f_wr, .f_addr, .f_mask, .f_data, .pending, .bypass);

  initial begin
    srv_rd = 0; f_wr = 0; srv_addr = 0; f_addr = 0; f_mask = 0; f_data = '0;
    m_pend = 0; do_chk = 0;
    foreach (written[i]) written[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8000; i++) begin
      @(negedge clk);
      if (do_chk)
        for (int q = 0; q < TB_QUADS; q++)
          if (exp_known[q]) check(rd_data[q*32 +: 32] == exp_data[q*32 +: 32], "read data");
      srv_rd   = 1'($urandom_range(1));
      f_wr     = $urandom_range(2) == 0;
      srv_addr = 7'($urandom_range(7));
      f_addr   = (1'($urandom_range(1)) == 0) ? srv_addr : 7'($urandom_range(7));
      f_mask   = 8'($urandom);
      for (int q = 0; q < TB_QUADS; q++) f_data[q*32 +: 32] = $urandom;
      #1;
      check(pending == m_pend, "pending flag");
      check(srv_gnt == (srv_rd && !(m_pend && f_wr)), "grant");
      n_ref  += (srv_rd && !srv_gnt);
      n_byp  += bypass;
      n_pend += (srv_rd && srv_gnt && m_pend);
      do_chk = srv_rd && srv_gnt;
      for (int q = 0; q < TB_QUADS; q++) begin
        exp_data[q*32 +: 32] = model[srv_addr][q];
        exp_known[q] = written[srv_addr][q];
      end
      @(posedge clk);
      if (f_wr) begin
        for (int q = 0; q < TB_QUADS; q++)
          if (f_mask[q]) begin model[f_addr][q] = f_data[q*32 +: 32]; written[f_addr][q] = 1'b1; end
        m_pend = 1;
      end else if (m_pend && !(srv_rd && srv_gnt)) begin
        m_pend = 0;
      end
    end
    check(n_ref > 0, "server refused at least once");
    check(n_byp > 0, "bypass at least once");
    check(n_pend > 0, "read while a write is pending");
    finish_test();
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    finish_test();
  end
endmodule
