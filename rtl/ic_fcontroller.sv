// FController: the state machine that arbitrates the prefetcher and the demand
// fetcher and tells the MMU what the fetcher is doing (DemandOrPre).
//
// States and DemandOrPre codes: Rest 00, PreF 01, DemF 10, DemF3 11. The next
// state is decided from the control bus C (Request, StartFetcher,
// TransferBlockHit, Ready, QuadPointer, State, CacheHit), with the priority
// order Rest, DemF, DemF3, PreF of the document's control-connector table:
//   A -> Rest : no StartFetcher, quad pointer 9, state PreF or DemF, no CacheHit
//   B -> DemF : StartFetcher in Rest or DemF, or StartFetcher in PreF with
//               quad pointer 9 (prefetch just complete)
//   C -> DemF3: StartFetcher in PreF with quad pointer 8 or lower (prefetch stopped)
//   D -> PreF : Request, no StartFetcher, next transfer block absent,
//               quad pointer 0, state Rest
//   otherwise : stay, except DemF3, which always moves on to DemF.
// The state is held in two flip-flops reset to Rest; state also serves as the
// fetcher's State register. go_pref / go_demf flag the clock edges that start
// a prefetch or a demand fetch (go_demf also when a finished demand fetch is
// followed directly by a new StartFetcher). Mealy outputs, registered state.
// The Ready bit of the control bus is not part of any transition pattern and
// is left unused.
module ic_fcontroller
  import icache_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  fctrl_t     c,
  output fstate_e    state,
  output fstate_e    next_state,
  output logic [1:0] demand_or_pre,
  output logic       go_pref,
  output logic       go_demf
);

  localparam qp_t QP_FULL = qp_t'(TB_QUADS + 1);  // 9

  logic a, b, cc, d;

  always_comb begin
    a  = !c.start_fetcher && c.qp == QP_FULL &&
         (c.state == FC_PREF || c.state == FC_DEMF) && !c.cache_hit;
    b  = c.start_fetcher && ((c.state == FC_REST || c.state == FC_DEMF) ||
                             (c.state == FC_PREF && c.qp == QP_FULL));
    cc = c.start_fetcher && c.state == FC_PREF && c.qp <= qp_t'(TB_QUADS);
    d  = c.request && !c.start_fetcher && !c.tb_hit && c.qp == '0 && c.state == FC_REST;
    if (a)                      next_state = FC_REST;
    else if (b)                 next_state = FC_DEMF;
    else if (cc)                next_state = FC_DEMF3;
    else if (d)                 next_state = FC_PREF;
    else if (state == FC_DEMF3) next_state = FC_DEMF;
    else                        next_state = state;
  end

  assign go_pref = state == FC_REST && next_state == FC_PREF;
  assign go_demf = next_state == FC_DEMF && (state != FC_DEMF || c.start_fetcher);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= FC_REST;
    else        state <= next_state;
  end

  assign demand_or_pre = state;

endmodule
