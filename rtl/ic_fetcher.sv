// Fetcher: brings quads from the bus unit into the fetch buffer and from there
// into the cache, in demand mode (for a miss of the server) and in prefetch mode
// (the next transfer block, when the requested one is served and the next one
// is not yet present: prefetch lookup on hits).
//
// Parts: the FController state machine, the prefetcher, the demand fetcher, the
// comparators that decide TransferBlockHit, and the merge multiplexers. The
// control bus C gathers Request, StartFetcher, TransferBlockHit, Ready, the
// merged quad pointer, the state and CacheHit for the FController.
//
// Interface to the rest of the cache:
//   - set_f selects the tag/status row read into row_f: the next transfer
//     block's set while idle (for the comparators), the fetched transfer
//     block's set otherwise (for the cache update);
//   - fb_init / fb_tba start a fetch: the fetch buffer is cleared and the status
//     register takes the transfer-block address;
//   - enab_f and qp let the control bus unit steer incoming quads into the
//     fetch buffer;
//   - load_cache writes tag/status (tag_we, new_row) at once and posts the data
//     RAM write (ram_addr, fetch-buffer valid bits as quad mask);
//   - bus unit: valid (one-cycle pulse), count (quads wanted - 1), cancel, and
//     fetch_address (quad address of the first wanted quad);
//   - demand_pre for the MMU.
// The four parts and the control bus layout follow the original fetcher; the
// port names, the merged tag/status row and the pulse timing are this design's
// choices.
// The comparators' separate hit flags and the next state are computed but not
// used here; they are kept as test points, as in the original comparator block.
module ic_fetcher
  import icache_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                request,
  input  logic                start_fetcher,
  input  logic                cache_hit,
  input  logic                ready,
  input  qaddr_t              address,
  input  qaddr_t              target,
  input  qaddr_t              pref_ad,
  input  tba_t                fetch_ad,
  input  logic                fb_used,
  input  tba_t                read_ad,
  input  logic                rb_used,
  input  logic [TB_QUADS-1:0] fb_valid,
  input  tag_row_t            row_f,
  output set_t                set_f,
  output logic                fb_init,
  output tba_t                fb_tba,
  output logic                enab_f,
  output qp_t                 qp,
  output logic                load_cache,
  output tag_row_t            new_row,
  output logic [RAM_AW-1:0]   ram_addr,
  output logic                valid,
  output logic [COUNT_W-1:0]  count,
  output logic                cancel,
  output qaddr_t              fetch_address,
  output logic [1:0]          demand_pre,
  output fstate_e             state,
  output logic                tb_hit
);

  fctrl_t   c;
  fstate_e  next_state;
  logic     go_pref, go_demf;
  tba_t     next_tba;
  logic     fetch_hit, read_hit, cache_it;

  qp_t                qp_pre, qp_dem;
  logic [COUNT_W-1:0] count_pre, count_dem;
  logic               valid_pre, valid_dem, cancel_pre, enab_pre, enab_dem;
  logic               load_pre, load_dem;
  tag_row_t           row_pre, row_dem;
  logic [RAM_AW-1:0]  addr_pre, addr_dem;
  logic [WORD_W-1:0]  first_word;

  always_comb begin
    c               = '0;
    c.request       = request;
    c.start_fetcher = start_fetcher;
    c.tb_hit        = tb_hit;
    c.ready         = ready;
    c.qp            = qp;
    c.state         = state;
    c.cache_hit     = cache_hit;
  end

  ic_fcontroller u_fctrl (
    .clk, .rst_n, .c, .state, .next_state, .demand_or_pre(demand_pre),
    .go_pref, .go_demf
  );

  ic_fetch_comparators u_cmp (
    .address, .fetch_ad, .fb_used, .read_ad, .rb_used, .row(row_f),
    .next_tba, .fetch_hit, .read_hit, .cache_it, .tb_hit
  );

  ic_prefetcher u_pre (
    .clk, .rst_n, .state, .go_pref, .ready, .fetch_ad, .row(row_f), .fb_valid,
    .qp(qp_pre), .valid(valid_pre), .count(count_pre), .cancel(cancel_pre),
    .enab(enab_pre), .load_cache(load_pre), .new_row(row_pre), .ram_addr(addr_pre)
  );

  ic_demand_fetcher u_dem (
    .clk, .rst_n, .state, .go_demf, .ready, .target, .fetch_ad, .row(row_f), .fb_valid,
    .qp(qp_dem), .valid(valid_dem), .count(count_dem), .first_word,
    .enab(enab_dem), .load_cache(load_dem), .new_row(row_dem), .ram_addr(addr_dem)
  );

  ic_fetch_merge u_merge (
    .state,
    .qp_pre, .count_pre, .valid_pre, .cancel_pre, .enab_pre, .load_pre, .row_pre, .addr_pre,
    .qp_dem, .count_dem, .valid_dem, .enab_dem, .load_dem, .row_dem, .addr_dem,
    .qp, .count, .valid, .cancel, .enab(enab_f), .load_cache, .new_row, .ram_addr
  );

  assign set_f   = (state == FC_REST) ? set_of(next_tba) : set_of(fetch_ad);
  assign fb_init = go_pref || go_demf;
  assign fb_tba  = go_demf ? tba_of(target) : tba_of(pref_ad);
  assign fetch_address = {fetch_ad, (state == FC_DEMF) ? first_word : WORD_W'(0)};

endmodule
