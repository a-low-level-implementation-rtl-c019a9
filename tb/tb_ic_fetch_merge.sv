// Random test of the fetcher merge multiplexers. For each FController state
// the merged outputs must come from the source the state selects:
// nothing in Rest, the prefetcher in PreF, the demand fetcher in DemF, and in
// DemF3 the prefetcher's cache update and Cancel with the demand fetcher's
// quad pointer and no Valid.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ic_fetch_merge;
  import icache_pkg::*;

  fstate_e            state;
  qp_t                qp_pre, qp_dem, qp;
  logic [COUNT_W-1:0] count_pre, count_dem, count;
  logic               valid_pre, cancel_pre, enab_pre, load_pre, valid_dem, enab_dem, load_dem;
  logic               valid, cancel, enab, load_cache;
  tag_row_t           row_pre, row_dem, new_row;
  logic [RAM_AW-1:0]  addr_pre, addr_dem, ram_addr;
  int checks = 0, failures = 0;

  ic_fetch_merge dut (.*);

  task automatic expect_out(qp_t eqp, logic [2:0] ec, logic ev, logic ecan, logic een, logic eld,
                            tag_row_t erow, logic [RAM_AW-1:0] ea, logic check_row);
    checks++;
    if (qp != eqp || count != ec || valid != ev || cancel != ecan || enab != een || load_cache != eld ||
        (check_row && (new_row != erow || ram_addr != ea))) begin
      failures++;
      $display("FAIL state %s", state.name());
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      state = fstate_e'($urandom_range(3));
      qp_pre = 4'($urandom); qp_dem = 4'($urandom);
      count_pre = 3'($urandom); count_dem = 3'($urandom);
      {valid_pre, cancel_pre, enab_pre, load_pre, valid_dem, enab_dem, load_dem} = 7'($urandom);
      row_pre = $bits(tag_row_t)'({$urandom, $urandom, $urandom, $urandom, $urandom});
      row_dem = $bits(tag_row_t)'({$urandom, $urandom, $urandom, $urandom, $urandom});
      addr_pre = 7'($urandom); addr_dem = 7'($urandom);
      #1;
      case (state)
        FC_REST:  expect_out('0, '0, 0, 0, 0, 0, row_pre, addr_pre, 0);
        FC_PREF:  expect_out(qp_pre, count_pre, valid_pre, cancel_pre, enab_pre, load_pre, row_pre, addr_pre, 1);
        FC_DEMF3: expect_out(qp_dem, count_pre, 0, cancel_pre, 0, load_pre, row_pre, addr_pre, 1);
        FC_DEMF:  expect_out(qp_dem, count_dem, valid_dem, 0, enab_dem, load_dem, row_dem, addr_dem, 1);
      endcase
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
