// CacheUpdate operator: computes the new tag/status row and the data RAM row
// for writing a (partly) filled fetch buffer into the cache.
//
// Way choice (_WrCache): way 0 if its tag equals the tag of the fetched
// transfer block, else way 1 if its tag equals it, else a replacement. Tag
// compares count only for valid blocks. The replaced way is an invalid way if
// there is one (way 0 first), else the way whose LRU bit marks it least
// recently used. On a replacement the way gets the new tag, block valid is set
// and all its data-valid bits are cleared; then the valid bits of the fetched
// quads (mask) are ORed into the data-valid bits of the transfer block. With
// TOUCH_LRU the written way becomes most recently used (demand fetch); without
// it the LRU bits are left alone, except that a replaced way becomes most
// recently used so it is not replaced again at once. Combinational.
module ic_cache_update
  import icache_pkg::*;
#(
  parameter bit TOUCH_LRU = 1'b1
) (
  input  tba_t                tba,
  input  tag_row_t            row,
  input  logic [TB_QUADS-1:0] mask,
  output tag_row_t            new_row,
  output logic                way,
  output logic                replace,
  output logic [RAM_AW-1:0]   ram_addr
);

  tag_t t;
  logic hit0, hit1;

  always_comb begin
    t    = tag_of(tba);
    hit0 = row.st0.bvalid && row.tag0 == t;
    hit1 = row.st1.bvalid && row.tag1 == t;
    replace = !hit0 && !hit1;
    if (hit0)                way = 1'b0;
    else if (hit1)           way = 1'b1;
    else if (!row.st0.bvalid) way = 1'b0;
    else if (!row.st1.bvalid) way = 1'b1;
    else                     way = row.st1.lru;   // way 1 least recently used -> replace it

    new_row = row;
    if (!way) begin
      if (replace) begin
        new_row.tag0       = t;
        new_row.st0.bvalid = 1'b1;
        new_row.st0.dvalid = '0;
      end
      new_row.st0.dvalid[tb_of(tba)*TB_QUADS +: TB_QUADS] =
        new_row.st0.dvalid[tb_of(tba)*TB_QUADS +: TB_QUADS] | mask;
    end else begin
      if (replace) begin
        new_row.tag1       = t;
        new_row.st1.bvalid = 1'b1;
        new_row.st1.dvalid = '0;
      end
      new_row.st1.dvalid[tb_of(tba)*TB_QUADS +: TB_QUADS] =
        new_row.st1.dvalid[tb_of(tba)*TB_QUADS +: TB_QUADS] | mask;
    end
    if (TOUCH_LRU || replace) begin
      new_row.st0.lru = way;
      new_row.st1.lru = !way;
    end
  end

  assign ram_addr = {set_of(tba), way, tb_of(tba)};

endmodule
