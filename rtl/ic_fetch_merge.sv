// Fetcher merge multiplexers (Merge2, CountMerge, SignalMerger).
//
// The prefetcher and the demand fetcher each drive their own copy of the
// fetcher outputs; the FController state selects which copy leaves the fetcher:
//   Rest  : quad pointer 0, Count 0, no Valid, no cache write
//   PreF  : prefetcher
//   DemF3 : prefetcher for the cache update and Cancel, demand fetcher's quad
//           pointer (the document's "DemandPreFetching" function)
//   DemF  : demand fetcher
// Merge2 is the 4-bit three-input quad-pointer multiplexer with a constant 0
// input. Combinational.
// The merge blocks and the Merge2 multiplexer follow the original fetcher; the
// Rest values of Count and Valid are this design's choice.
module ic_fetch_merge
  import icache_pkg::*;
(
  input  fstate_e             state,
  // prefetcher
  input  qp_t                 qp_pre,
  input  logic [COUNT_W-1:0]  count_pre,
  input  logic                valid_pre,
  input  logic                cancel_pre,
  input  logic                enab_pre,
  input  logic                load_pre,
  input  tag_row_t            row_pre,
  input  logic [RAM_AW-1:0]   addr_pre,
  // demand fetcher
  input  qp_t                 qp_dem,
  input  logic [COUNT_W-1:0]  count_dem,
  input  logic                valid_dem,
  input  logic                enab_dem,
  input  logic                load_dem,
  input  tag_row_t            row_dem,
  input  logic [RAM_AW-1:0]   addr_dem,
  // merged
  output qp_t                 qp,
  output logic [COUNT_W-1:0]  count,
  output logic                valid,
  output logic                cancel,
  output logic                enab,
  output logic                load_cache,
  output tag_row_t            new_row,
  output logic [RAM_AW-1:0]   ram_addr
);

  always_comb begin
    unique case (state)
      FC_REST: begin
        qp = '0;     count = '0;        valid = 1'b0;      cancel = 1'b0;
        enab = 1'b0; load_cache = 1'b0; new_row = row_pre; ram_addr = addr_pre;
      end
      FC_PREF: begin
        qp = qp_pre;     count = count_pre;     valid = valid_pre; cancel = cancel_pre;
        enab = enab_pre; load_cache = load_pre; new_row = row_pre; ram_addr = addr_pre;
      end
      FC_DEMF3: begin
        qp = qp_dem;     count = count_pre;     valid = 1'b0;      cancel = cancel_pre;
        enab = 1'b0;     load_cache = load_pre; new_row = row_pre; ram_addr = addr_pre;
      end
      default: begin // FC_DEMF
        qp = qp_dem;     count = count_dem;     valid = valid_dem; cancel = 1'b0;
        enab = enab_dem; load_cache = load_dem; new_row = row_dem; ram_addr = addr_dem;
      end
    endcase
  end

endmodule
