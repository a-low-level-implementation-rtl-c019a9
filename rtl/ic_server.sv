// Server: answers the instruction unit's requests for two consecutive quads.
//
// The instruction unit gives the address of the first quad and holds Request;
// the second quad is the next quad address. The server looks up one quad at a
// time (phase 0: first quad, phase 1: second quad) in three places, in this
// order: the fetch buffer, the read buffer, the cache (tag/status lookup in the
// target's set). A quad found in a buffer is latched into DataLow / DataHigh and
// Ready1 / Ready2 is raised. A cache hit reads the whole transfer block from the
// data RAM into the read buffer (one cycle to read, one to load) and marks the
// way most recently used; the quad is then found in the read buffer. When the
// quad is in the transfer block the fetcher is filling, the server waits for it.
// Otherwise it is a miss: the server raises StartFetcher for one cycle, as soon
// as the fetcher can take a demand fetch (idle, prefetching, or finished), and
// then waits for the quad in the fetch buffer. When both quads are delivered the
// server holds Ready1/Ready2 until Ack and then returns to idle.
//
// The document gives the three search places, the read-buffer copy of a hit
// transfer block, StartFetcher and the Ack handshake; the state sequence and
// its cycle timing are this design's choices. A quad is found at the earliest
// one cycle after Request (buffer hit); a cache hit adds two cycles.
module ic_server
  import icache_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // instruction unit
  input  logic                request,
  input  qaddr_t              address,
  input  logic                ack,
  output logic                ready1,
  output logic                ready2,
  output quad_t               data_low,
  output quad_t               data_high,
  // tag/status memory
  output set_t                set_s,
  input  tag_row_t            row_s,
  output logic                touch,
  output logic                tway,
  // buffers and status register
  input  tba_t                fetch_ad,
  input  logic                fb_used,
  input  logic [TB_QUADS-1:0] fb_valid,
  input  tba_t                read_ad,
  input  logic                rb_used,
  input  logic [TB_QUADS-1:0] rb_valid,
  output logic                rb_load,
  output tba_t                rb_tba,
  output logic [TB_QUADS-1:0] rb_vin,
  output logic                src_fb,
  output logic [WORD_W-1:0]   word,
  input  quad_t               quad,
  // data RAM
  output logic                ram_rd,
  output logic [RAM_AW-1:0]   ram_addr,
  input  logic                ram_gnt,
  // fetcher
  input  fstate_e             fstate,
  input  qp_t                 fqp,
  output qaddr_t              target,
  output logic                start_fetcher,
  output logic                cache_hit,
  // events, for observation
  output logic                ev_fb_hit,
  output logic                ev_rb_hit,
  output logic                ev_wait
);

  typedef enum logic [1:0] {S_IDLE, S_LOOK, S_LOAD, S_DONE} sstate_e;

  localparam qp_t QP_FULL = qp_t'(TB_QUADS + 1);

  sstate_e st;
  qaddr_t  tgt;
  logic    phase;

  tba_t            t_tba;
  logic            fb_match, fb_hit, rb_hit, fb_wait, h0, h1, chit, can_start, fetch_busy;
  logic [TB_W-1:0] tb;
  logic [TB_QUADS-1:0] tv0, tv1;

  always_comb begin
    target     = tgt + qaddr_t'(phase);
    t_tba      = tba_of(target);
    word       = word_of(target);
    tb         = tb_of(t_tba);
    set_s      = set_of(t_tba);
    fetch_busy = ((fstate == FC_PREF || fstate == FC_DEMF) && fqp != QP_FULL) ||
                 fstate == FC_DEMF3;
    fb_match   = fb_used && fetch_ad == t_tba;
    fb_hit     = st == S_LOOK && fb_match && fb_valid[word];
    rb_hit     = st == S_LOOK && !fb_hit && rb_used && read_ad == t_tba && rb_valid[word];
    fb_wait    = st == S_LOOK && !fb_hit && !rb_hit &&
                 ((fb_match && fetch_busy) || fstate == FC_DEMF3);
    tv0        = tb_valid(row_s.st0, tb);
    tv1        = tb_valid(row_s.st1, tb);
    h0         = row_s.st0.bvalid && row_s.tag0 == tag_of(t_tba) && tv0[word];
    h1         = row_s.st1.bvalid && row_s.tag1 == tag_of(t_tba) && tv1[word];
    chit       = st == S_LOOK && !fb_hit && !rb_hit && !fb_wait && (h0 || h1);
    can_start  = fstate == FC_REST || fstate == FC_PREF || (fstate == FC_DEMF && fqp == QP_FULL);
    start_fetcher = st == S_LOOK && !fb_hit && !rb_hit && !fb_wait && !(h0 || h1) && can_start;
    src_fb     = fb_hit;
    ram_rd     = chit;
    ram_addr   = {set_s, h1 && !h0, tb};
    cache_hit  = chit && ram_gnt;
    touch      = cache_hit;
    tway       = h1 && !h0;
    rb_load    = st == S_LOAD;
    ev_fb_hit  = fb_hit;
    ev_rb_hit  = rb_hit;
    ev_wait    = fb_wait;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      tgt       <= '0;
      phase     <= 1'b0;
      ready1    <= 1'b0;
      ready2    <= 1'b0;
      data_low  <= '0;
      data_high <= '0;
      rb_tba    <= '0;
      rb_vin    <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (request) begin
          tgt   <= address;
          phase <= 1'b0;
          st    <= S_LOOK;
        end
        S_LOOK: begin
          if (fb_hit || rb_hit) begin
            if (!phase) begin
              data_low <= quad;
              ready1   <= 1'b1;
              phase    <= 1'b1;
            end else begin
              data_high <= quad;
              ready2    <= 1'b1;
              st        <= S_DONE;
            end
          end else if (cache_hit) begin
            rb_tba <= t_tba;
            rb_vin <= h0 ? tv0 : tv1;
            st     <= S_LOAD;
          end
        end
        S_LOAD: st <= S_LOOK;
        S_DONE: if (ack) begin
          ready1 <= 1'b0;
          ready2 <= 1'b0;
          phase  <= 1'b0;
          st     <= S_IDLE;
        end
      endcase
    end
  end

endmodule
