// Fetcher comparators: is the transfer block after the requested one already
// present? (TransferBlockHit)
//
// The next transfer-block address is the requested one plus one (43-bit adder).
// It is compared with the transfer-block addresses of the fetch buffer
// (FetchHit) and the read buffer (_ReadHit), and its tag with both tags of its
// set (CacheIt: valid block, equal tag and all eight data-valid bits of that
// transfer block set). TransferBlockHit is the OR of the three. The row input
// must be the tag/status row of the next transfer block's set. Combinational.
// The document gives the comparator set and the adder; counting a cached
// transfer block as present only when all its quads are valid is this design's
// reading of its status-select comparators.
// The OR of the three follows the three hit outputs of the original; that a
// transfer block held in a buffer also counts is this design's choice.
module ic_fetch_comparators
  import icache_pkg::*;
(
  input  qaddr_t   address,
  input  tba_t     fetch_ad,
  input  logic     fb_used,
  input  tba_t     read_ad,
  input  logic     rb_used,
  input  tag_row_t row,
  output tba_t     next_tba,
  output logic     fetch_hit,
  output logic     read_hit,
  output logic     cache_it,
  output logic     tb_hit
);

  tag_t             t;
  logic [TB_W-1:0]  tb;

  always_comb begin
    next_tba  = tba_of(address) + tba_t'(1);
    t         = tag_of(next_tba);
    tb        = tb_of(next_tba);
    fetch_hit = fb_used && fetch_ad == next_tba;
    read_hit  = rb_used && read_ad == next_tba;
    cache_it  = (row.st0.bvalid && row.tag0 == t && &tb_valid(row.st0, tb)) ||
                (row.st1.bvalid && row.tag1 == t && &tb_valid(row.st1, tb));
    tb_hit    = fetch_hit || read_hit || cache_it;
  end

endmodule
