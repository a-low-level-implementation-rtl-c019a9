// Random test of the fetch buffer. Random single-slot loads and clears
// (init) are applied. The valid bits and the data of every valid slot are
// compared with a model after each clock. Each slot must be loaded, and each
// clear must be seen.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ic_fetch_buffer;
  import icache_pkg::*;
  `include "tb_ic_buffers_common.svh"

  logic                init;
  logic [TB_QUADS-1:0] load, valid, mvalid;
  quad_t               din;
  logic [TBLK_W-1:0]   data;
  quad_t               mdata [TB_QUADS];
  int n_init = 0;

  ic_fetch_buffer dut (.clk, .rst_n, .init, .load, .din, .data, .valid);

  initial begin
    init = 0; load = '0; din = '0; mvalid = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      check(valid == mvalid, "valid bits");
      for (int q = 0; q < TB_QUADS; q++)
        if (mvalid[q]) check(data[q*QUAD_W +: QUAD_W] == mdata[q], "slot data");
      init = ($urandom_range(15) == 0);
      load = ($urandom_range(3) != 0) ? 8'(1 << $urandom_range(7)) : '0;
      din  = $urandom;
      @(posedge clk);
      if (init) begin mvalid = '0; n_init++; end
      else for (int q = 0; q < TB_QUADS; q++) if (load[q]) begin mvalid[q] = 1; mdata[q] = din; end
    end
    check(n_init > 0, "init coverage");
    finish_test();
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    finish_test();
  end
endmodule
