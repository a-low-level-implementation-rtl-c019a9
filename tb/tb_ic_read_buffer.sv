// Random test of the read buffer: random loads of a whole transfer block
// with valid bits. Data and valid bits must follow the last load and hold in
// between.
module tb_ic_read_buffer;
  import icache_pkg::*;
  `include "tb_ic_buffers_common.svh"

  logic                load;
  logic [TBLK_W-1:0]   din, data, mdata;
  logic [TB_QUADS-1:0] vin, valid, mvalid;

  ic_read_buffer dut (.clk, .rst_n, .load, .din, .vin, .data, .valid);

  initial begin
    load = 0; din = '0; vin = '0; mvalid = '0; mdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(valid == mvalid, "valid bits");
      check(data == mdata, "data");
      load = 1'($urandom_range(1));
      for (int q = 0; q < TB_QUADS; q++) din[q*QUAD_W +: QUAD_W] = $urandom;
      vin = 8'($urandom);
      @(posedge clk);
      if (load) begin mvalid = vin; mdata = din; end
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
