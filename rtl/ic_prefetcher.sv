// Prefetcher: fetches the whole next transfer block while the fetcher is in
// PreF, and writes it into the cache when it is complete or when a demand fetch
// stops it.
//
// On go_pref (the edge into PreF) the quad pointer is set to 1 and, one cycle
// later, Valid is pulsed to the bus unit with Count 7 (eight quads). Each Ready
// in PreF stores one quad (slot qp-1) and increments the quad pointer through a
// lookahead incrementer; 9 means the buffer is full. LoadCache is raised once
// when the pointer reaches 9, and also in DemF3, when a demand fetch has stopped
// the prefetch: then the quads received so far are written and the bus unit is
// told to Cancel the rest. The CacheUpdate operator (without LRU touch) gives
// the new tag/status row and the data RAM row. Flow and quad-pointer use follow
// the document; the one-cycle Valid pulse and the Count coding are this
// design's choices.
// The incrementer's carry-out and the cache update's way and replace flags are
// not needed here and stay unconnected.
module ic_prefetcher
  import icache_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  fstate_e             state,
  input  logic                go_pref,
  input  logic                ready,
  input  tba_t                fetch_ad,
  input  tag_row_t            row,
  input  logic [TB_QUADS-1:0] fb_valid,
  output qp_t                 qp,
  output logic                valid,
  output logic [COUNT_W-1:0]  count,
  output logic                cancel,
  output logic                enab,
  output logic                load_cache,
  output tag_row_t            new_row,
  output logic [RAM_AW-1:0]   ram_addr
);

  localparam qp_t QP_FULL = qp_t'(TB_QUADS + 1);

  logic wb_done, step, way, replace;
  qp_t  qp_inc;
  logic c4;

  assign enab   = state == FC_PREF;
  assign step   = enab && ready && qp != '0 && qp != QP_FULL;
  assign count  = COUNT_W'(TB_QUADS - 1);
  assign cancel = state == FC_DEMF3;
  assign load_cache = |fb_valid &&
                      ((state == FC_PREF && qp == QP_FULL && !wb_done) || state == FC_DEMF3);

  ic_inc4 u_inc (.a(qp), .c0(1'b1), .s(qp_inc), .c4(c4));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qp      <= '0;
      valid   <= 1'b0;
      wb_done <= 1'b0;
    end else begin
      valid <= go_pref;
      if (go_pref) begin
        qp      <= qp_t'(1);
        wb_done <= 1'b0;
      end else begin
        if (step) qp <= qp_inc;
        if (load_cache) wb_done <= 1'b1;
      end
    end
  end

  ic_cache_update #(.TOUCH_LRU(1'b0)) u_upd (
    .tba(fetch_ad), .row(row), .mask(fb_valid),
    .new_row(new_row), .way(way), .replace(replace), .ram_addr(ram_addr)
  );

endmodule
