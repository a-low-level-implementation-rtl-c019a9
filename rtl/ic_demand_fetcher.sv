// Demand fetcher: fetches the quads the server could not find, from the
// requested quad to the end of its transfer block.
//
// On go_demf (the edge into DemF) the quad pointer is set to word+1, so the
// first quad lands in its own slot of the fetch buffer, and Count = 7 - word
// (quads wanted minus one) is latched; Valid is pulsed one cycle later. Each
// Ready in DemF stores one quad and increments the pointer; at 9 the buffer end
// is reached and LoadCache is raised once, writing the valid quads into the
// cache through the CacheUpdate operator, which also marks the written way most
// recently used. The start word is kept so the bus unit gets the address of the
// first wanted quad. The document gives the 3-bit two's-complement subtraction
// for Count and the quad-pointer flow; the exact coding is this design's choice.
// The incrementer's carry-out and the cache update's way and replace flags are
// not needed here and stay unconnected.
module ic_demand_fetcher
  import icache_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  fstate_e             state,
  input  logic                go_demf,
  input  logic                ready,
  input  qaddr_t              target,
  input  tba_t                fetch_ad,
  input  tag_row_t            row,
  input  logic [TB_QUADS-1:0] fb_valid,
  output qp_t                 qp,
  output logic                valid,
  output logic [COUNT_W-1:0]  count,
  output logic [WORD_W-1:0]   first_word,
  output logic                enab,
  output logic                load_cache,
  output tag_row_t            new_row,
  output logic [RAM_AW-1:0]   ram_addr
);

  localparam qp_t QP_FULL = qp_t'(TB_QUADS + 1);

  logic wb_done, step, way, replace;
  qp_t  qp_inc;
  logic c4;

  assign enab       = state == FC_DEMF;
  assign step       = enab && ready && qp != '0 && qp != QP_FULL;
  assign load_cache = enab && qp == QP_FULL && !wb_done && |fb_valid;

  ic_inc4 u_inc (.a(qp), .c0(1'b1), .s(qp_inc), .c4(c4));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qp         <= '0;
      valid      <= 1'b0;
      wb_done    <= 1'b0;
      count      <= '0;
      first_word <= '0;
    end else begin
      valid <= go_demf;
      if (go_demf) begin
        qp         <= qp_t'(word_of(target)) + qp_t'(1);
        count      <= COUNT_W'(TB_QUADS - 1) - COUNT_W'(word_of(target));
        first_word <= word_of(target);
        wb_done    <= 1'b0;
      end else begin
        if (step) qp <= qp_inc;
        if (load_cache) wb_done <= 1'b1;
      end
    end
  end

  ic_cache_update #(.TOUCH_LRU(1'b1)) u_upd (
    .tba(fetch_ad), .row(row), .mask(fb_valid),
    .new_row(new_row), .way(way), .replace(replace), .ram_addr(ram_addr)
  );

endmodule
