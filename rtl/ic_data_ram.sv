// Data RAM of the instruction cache with its access arbiter.
//
// The RAM is 128 rows of one transfer block each (8 quads = 256 bits). The row
// address is {set, way, transfer block}, following the document's order of set
// field, block field and transfer-block field. It is single ported: one read or
// one write per clock, as no multiported RAM was available.
//
// Arbitration: the server (reads into the read buffer) has priority over the
// fetcher (writes of the fetch buffer). A fetcher write is posted into a
// one-entry pending register and performed in the first cycle without a server
// read. A server read of the row held in the pending register gets the pending
// quads merged into its data (bypass), so a transfer block whose status was
// already updated is never read stale. If a new write arrives while the pending
// register is still full and the server also reads, the old write goes first and
// the server is refused for that cycle (srv_gnt low).
//
// Timing: a granted read (srv_rd && srv_gnt) delivers rd_data one cycle later.
// The arbiter policy follows the document (server first); posting, bypass and
// refusal are this design's choices. The array has no reset.
module ic_data_ram
  import icache_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // server read port
  input  logic                  srv_rd,
  input  logic [RAM_AW-1:0]     srv_addr,
  output logic                  srv_gnt,
  output logic [TBLK_W-1:0]     rd_data,
  // fetcher write port
  input  logic                  f_wr,
  input  logic [RAM_AW-1:0]     f_addr,
  input  logic [TB_QUADS-1:0]   f_mask,
  input  logic [TBLK_W-1:0]     f_data,
  // observation
  output logic                  pending,
  output logic                  bypass
);

  logic [TBLK_W-1:0] mem [RAM_DEPTH];

  logic                p_valid;
  logic [RAM_AW-1:0]   p_addr;
  logic [TB_QUADS-1:0] p_mask;
  logic [TBLK_W-1:0]   p_data;

  logic do_read, do_pwrite;

  assign srv_gnt   = srv_rd && !(p_valid && f_wr);
  assign do_read   = srv_rd && srv_gnt;
  assign do_pwrite = p_valid && !do_read;
  assign pending   = p_valid;
  assign bypass    = do_read && p_valid && (p_addr == srv_addr);

  // pending write register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_addr  <= '0;
      p_mask  <= '0;
      p_data  <= '0;
    end else if (f_wr) begin
      p_valid <= 1'b1;
      p_addr  <= f_addr;
      p_mask  <= f_mask;
      p_data  <= f_data;
    end else if (do_pwrite) begin
      p_valid <= 1'b0;
    end
  end

  // RAM array: masked quad write or read
  always_ff @(posedge clk) begin
    if (do_pwrite) begin
      for (int q = 0; q < TB_QUADS; q++)
        if (p_mask[q]) mem[p_addr][q*QUAD_W +: QUAD_W] <= p_data[q*QUAD_W +: QUAD_W];
    end
  end

  always_ff @(posedge clk) begin
    if (do_read) begin
      for (int q = 0; q < TB_QUADS; q++)
        rd_data[q*QUAD_W +: QUAD_W] <= (bypass && p_mask[q]) ? p_data[q*QUAD_W +: QUAD_W]
                                                            : mem[srv_addr][q*QUAD_W +: QUAD_W];
    end
  end

endmodule
