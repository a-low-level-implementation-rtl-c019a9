// Instruction cache of the C-processor: 4 KByte (1024 quads), two-way set
// associative, 16 sets, 32-quad blocks split into 8-quad transfer blocks, LRU
// replacement and "prefetch lookup on hits".
//
// The server answers the instruction unit (two consecutive quads per request,
// 64-bit data path as DataLow/DataHigh). The fetcher fills the fetch buffer from
// the 32-bit bus unit, in demand mode for a miss and in prefetch mode for the
// transfer block following a served request when that block is nowhere in the
// cache. The read buffer holds a copy of the last cache transfer block read, the
// status register the transfer-block addresses of both buffers and the
// prefetch address. The data RAM (with a server-first arbiter) and the
// tag/status memory hold the cache contents; the control bus unit steers quads
// into the fetch buffer and out to the instruction unit.
//
// Instruction unit: hold iu_request and iu_address (quad address) until
// iu_ready2, then pulse iu_ack and drop the request. iu_ready1 marks DataLow,
// iu_ready2 both quads.
// Bus unit: bu_valid is a one-cycle pulse with bu_address (quad address of the
// first wanted quad, still to be translated by the MMU) and bu_count (quads - 1,
// up to the end of the transfer block). The bus unit then returns the quads in
// order, one per bu_ready. bu_cancel (one cycle) abandons the rest of the
// current transfer. demand_pre tells the MMU the fetcher's mode (00 idle,
// 10 demand, 01 prefetch, 11 demand while the prefetcher updates the status);
// pref_add is the prefetch address.
module icache
  import icache_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // instruction unit
  input  logic               iu_request,
  input  qaddr_t             iu_address,
  input  logic               iu_ack,
  output logic               iu_ready1,
  output logic               iu_ready2,
  output quad_t              iu_data_low,
  output quad_t              iu_data_high,
  // bus unit and MMU
  output logic               bu_valid,
  output logic [COUNT_W-1:0] bu_count,
  output logic               bu_cancel,
  output qaddr_t             bu_address,
  input  quad_t              bu_data,
  input  logic               bu_ready,
  output logic [1:0]         demand_pre,
  output qaddr_t             pref_add,
  // events, for observation and test
  output logic               ev_cache_hit,
  output logic               ev_fb_hit,
  output logic               ev_rb_hit,
  output logic               ev_wait,
  output logic               ev_start_fetcher,
  output logic               ev_bypass,
  output logic               ev_ram_refused,
  output logic               ev_tb_hit,
  output logic               ev_ram_pending
);

  // tag/status
  set_t     set_f, set_s;
  tag_row_t row_f, row_s, new_row;
  logic     touch, tway;
  // fetcher
  logic                fb_init, enab_f, load_cache, start_fetcher, cache_hit, tb_hit;
  tba_t                fb_tba, fetch_ad, read_ad;
  logic                fb_used, rb_used;
  qp_t                 qp;
  logic [RAM_AW-1:0]   f_ram_addr;
  qaddr_t              target;
  fstate_e             fstate;
  // buffers
  logic [TB_QUADS-1:0] fb_load, fb_valid, rb_valid, rb_vin;
  logic [TBLK_W-1:0]   fb_data, rb_data, ram_data;
  logic                rb_load, src_fb;
  tba_t                rb_tba;
  logic [WORD_W-1:0]   word;
  quad_t               quad;
  // data RAM
  logic                ram_rd, ram_gnt, ram_pending;
  logic [RAM_AW-1:0]   s_ram_addr;

  ic_tag_status_ram u_tags (
    .clk, .rst_n, .set_f, .row_f, .set_s, .row_s,
    .we(load_cache), .wset(set_of(fetch_ad)), .wrow(new_row),
    .touch, .tset(set_s), .tway
  );

  ic_data_ram u_data (
    .clk, .rst_n,
    .srv_rd(ram_rd), .srv_addr(s_ram_addr), .srv_gnt(ram_gnt), .rd_data(ram_data),
    .f_wr(load_cache), .f_addr(f_ram_addr), .f_mask(fb_valid), .f_data(fb_data),
    .pending(ram_pending), .bypass(ev_bypass)
  );

  ic_fetch_buffer u_fbuf (
    .clk, .rst_n, .init(fb_init), .load(fb_load), .din(bu_data),
    .data(fb_data), .valid(fb_valid)
  );

  ic_read_buffer u_rbuf (
    .clk, .rst_n, .load(rb_load), .din(ram_data), .vin(rb_vin),
    .data(rb_data), .valid(rb_valid)
  );

  ic_status_reg u_stat (
    .clk, .rst_n, .fb_init, .fb_tba, .rb_load, .rb_tba, .address(iu_address),
    .fetch_ad, .read_ad, .fb_used, .rb_used, .pref_ad(pref_add)
  );

  ic_control_bus_unit u_cbu (
    .enab_f, .ready(bu_ready), .qp, .fb_load,
    .src_fb, .word, .fb_data, .rb_data, .quad
  );

  ic_server u_server (
    .clk, .rst_n,
    .request(iu_request), .address(iu_address), .ack(iu_ack),
    .ready1(iu_ready1), .ready2(iu_ready2), .data_low(iu_data_low), .data_high(iu_data_high),
    .set_s, .row_s, .touch, .tway,
    .fetch_ad, .fb_used, .fb_valid, .read_ad, .rb_used, .rb_valid,
    .rb_load, .rb_tba, .rb_vin, .src_fb, .word, .quad,
    .ram_rd, .ram_addr(s_ram_addr), .ram_gnt,
    .fstate, .fqp(qp), .target, .start_fetcher, .cache_hit,
    .ev_fb_hit, .ev_rb_hit, .ev_wait
  );

  ic_fetcher u_fetcher (
    .clk, .rst_n,
    .request(iu_request), .start_fetcher, .cache_hit, .ready(bu_ready),
    .address(iu_address), .target, .pref_ad(pref_add),
    .fetch_ad, .fb_used, .read_ad, .rb_used, .fb_valid, .row_f,
    .set_f, .fb_init, .fb_tba, .enab_f, .qp, .load_cache, .new_row, .ram_addr(f_ram_addr),
    .valid(bu_valid), .count(bu_count), .cancel(bu_cancel), .fetch_address(bu_address),
    .demand_pre, .state(fstate), .tb_hit
  );

  assign ev_cache_hit     = cache_hit;
  assign ev_start_fetcher = start_fetcher;
  assign ev_ram_refused   = ram_rd && !ram_gnt;
  assign ev_tb_hit        = tb_hit;
  assign ev_ram_pending   = ram_pending;

endmodule
