// Random test of the fetcher controller against its state table.
// Each cycle a random control bus word is applied, with the quad pointer
// biased towards the values 0, 8 and 9 that the conditions test. The state
// field of the bus is fed back from the controller, as in the fetcher. The
// next state, the DemandOrPre code and the two start strobes are compared
// with a model of the table:
//   Rest  when !StartFetcher, QP=9, state PreF or DemF, no cache hit
//   DemF  when StartFetcher in Rest or DemF, or in PreF with QP=9
//   DemF3 when StartFetcher in PreF with QP<=8
//   PreF  when Request, !StartFetcher, !TransferBlockHit, QP=0, state Rest
//   else stay, except that DemF3 always moves on to DemF.
// The transition table follows the original control-connector patterns; the
// random stimulus is this testbench's own.
module tb_ic_fcontroller;
  import icache_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fctrl_t     c;
  fstate_e    state, next_state;
  logic [1:0] dp;
  logic       go_pref, go_demf;
  int checks = 0, failures = 0;
  int seen [4];

  ic_fcontroller dut (.clk, .rst_n, .c, .state, .next_state, .demand_or_pre(dp), .go_pref, .go_demf);

  function automatic fstate_e model_next(fctrl_t x, fstate_e s);
    logic a, b, cc, d;
    a  = !x.start_fetcher && x.qp == 4'd9 && (s == FC_PREF || s == FC_DEMF) && !x.cache_hit;
    b  = x.start_fetcher && (s == FC_REST || s == FC_DEMF || (s == FC_PREF && x.qp == 4'd9));
    cc = x.start_fetcher && s == FC_PREF && x.qp <= 4'd8;
    d  = x.request && !x.start_fetcher && !x.tb_hit && x.qp == 4'd0 && s == FC_REST;
    if (a)  return FC_REST;
    if (b)  return FC_DEMF;
    if (cc) return FC_DEMF3;
    if (d)  return FC_PREF;
    return (s == FC_DEMF3) ? FC_DEMF : s;
  endfunction

  fstate_e exp_state, exp_next;

  initial begin
    c = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_state = FC_REST;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      checks++;
      if (state != exp_state) begin
        failures++;
        $display("FAIL cycle %0d state %s exp %s", i, state.name(), exp_state.name());
      end
      c.request       = ($urandom_range(3) != 0);
      c.start_fetcher = ($urandom_range(5) == 0);
      c.tb_hit        = ($urandom_range(2) == 0);
      c.ready         = 1'($urandom_range(1));
      case ($urandom_range(5))
        0, 1:    c.qp = 4'd0;
        2:       c.qp = 4'd9;
        3:       c.qp = 4'd8;
        default: c.qp = 4'($urandom_range(15));
      endcase
      c.state     = state;
      c.cache_hit = ($urandom_range(3) == 0);
      #1;
      exp_next = model_next(c, exp_state);
      checks += 4;
      if (next_state != exp_next) begin
        failures++;
        $display("FAIL next %s exp %s in %s, c=%b", next_state.name(), exp_next.name(), exp_state.name(), c);
      end
      if (dp != 2'(exp_state)) begin failures++; $display("FAIL DemandOrPre %b in %s", dp, exp_state.name()); end
      if (go_pref != (exp_state == FC_REST && exp_next == FC_PREF)) begin
        failures++; $display("FAIL go_pref");
      end
      if (go_demf != (exp_next == FC_DEMF && (exp_state != FC_DEMF || c.start_fetcher))) begin
        failures++; $display("FAIL go_demf");
      end
      seen[exp_state]++;
      exp_state = exp_next;
    end
    foreach (seen[s]) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL state %0d never reached", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
