// Random test of the TransferBlockHit comparators. The fetch buffer, read
// buffer and both cache ways are set up so that each often holds the
// transfer block after the current address. The three hit flags and their OR
// are compared with a model. A way counts only when all eight data-valid bits
// of that transfer block are set.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ic_fetch_comparators;
  import icache_pkg::*;

  qaddr_t   address;
  tba_t     fetch_ad, read_ad, next_tba;
  logic     fb_used, rb_used, fetch_hit, read_hit, cache_it, tb_hit;
  tag_row_t row;
  int checks = 0, failures = 0;
  int n_f = 0, n_r = 0, n_c = 0, n_none = 0;

  ic_fetch_comparators dut (.address, .fetch_ad, .fb_used, .read_ad, .rb_used, .row,
                            .next_tba, .fetch_hit, .read_hit, .cache_it, .tb_hit);

  initial begin
    for (int i = 0; i < 5000; i++) begin
      tba_t nt;
      logic ef, er, ec;
      logic [7:0] v0, v1;
      address  = {14'($urandom), $urandom};
      if ($urandom_range(7) == 0) address[ADDR_W-1:3] = '1;   // wrap of the next block address
      nt       = address[ADDR_W-1:3] + 1'b1;
      fetch_ad = ($urandom_range(2) == 0) ? nt : nt ^ tba_t'(1 << $urandom_range(42));
      read_ad  = ($urandom_range(2) == 0) ? nt : nt ^ tba_t'(1 << $urandom_range(42));
      fb_used  = $urandom_range(3) != 0;
      rb_used  = $urandom_range(3) != 0;
      row      = $bits(tag_row_t)'({$urandom, $urandom, $urandom, $urandom, $urandom});
      row.tag0 = ($urandom_range(2) == 0) ? nt[42:6] : row.tag0;
      row.tag1 = ($urandom_range(2) == 0) ? nt[42:6] : row.tag1;
      v0 = (1'($urandom_range(1)) == 0) ? 8'hFF : 8'($urandom);
      v1 = (1'($urandom_range(1)) == 0) ? 8'hFF : 8'($urandom);
      row.st0.dvalid[nt[1:0]*8 +: 8] = v0;
      row.st1.dvalid[nt[1:0]*8 +: 8] = v1;
      #1;
      ef = fb_used && fetch_ad == nt;
      er = rb_used && read_ad == nt;
      ec = (row.st0.bvalid && row.tag0 == nt[42:6] && v0 == 8'hFF) ||
           (row.st1.bvalid && row.tag1 == nt[42:6] && v1 == 8'hFF);
      checks += 5;
      if (next_tba != nt)  begin failures++; $display("FAIL next_tba"); end
      if (fetch_hit != ef) begin failures++; $display("FAIL fetch_hit"); end
      if (read_hit != er)  begin failures++; $display("FAIL read_hit"); end
      if (cache_it != ec)  begin failures++; $display("FAIL cache_it"); end
      if (tb_hit != (ef || er || ec)) begin failures++; $display("FAIL tb_hit"); end
      n_f += ef; n_r += er; n_c += ec; n_none += !(ef || er || ec);
    end
    checks++;
    if (n_f == 0 || n_r == 0 || n_c == 0 || n_none == 0) begin failures++; $display("FAIL coverage"); end
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
