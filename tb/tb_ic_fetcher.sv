// Test of the fetcher as a whole inside the cache, with random traffic over
// a few conflicting tags. Checked here:
//   - the DemandOrPre code only moves along the transitions of the
//     controller's state table: Rest to PreF or DemF, PreF to Rest, DemF or
//     DemF3, DemF3 to DemF, DemF to Rest or DemF;
//   - Valid reaches the bus unit only in the first cycle of PreF or DemF
//     (or of a new DemF started from DemF);
//   - Count and address of every bus request stay within one transfer block;
//   - quads from the bus land in the fetch buffer slot of their address;
//   - all delivered quads are the memory's.
// Each of the four states must be visited.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ic_fetcher;
  `include "tb_icache_iu.svh"

  logic [1:0] dp_q;
  int seen [4];
  qaddr_t cur;   // address of the next quad expected from the bus

  always @(posedge clk) if (rst_n) begin
    seen[demand_pre]++;
    case (dp_q)
      2'b00: check(demand_pre != 2'b11, "Rest to DemF3");
      2'b01: ;
      2'b11: check(demand_pre == 2'b10, "DemF3 to DemF");
      2'b10: check(demand_pre == 2'b10 || demand_pre == 2'b00, "DemF to Rest or DemF");
    endcase
    if (bu_valid) begin
      check(demand_pre == 2'b01 || demand_pre == 2'b10, "Valid only in PreF or DemF");
      check(int'(bu_count) + int'(word_of(bu_address)) == 7, "request ends at the transfer block end");
      cur = bu_address;
    end
    if (bu_ready && dut.enab_f) begin
      check(dut.fb_load == 8'(1 << word_of(cur)), "quad lands in its slot");
      check(bu_data == mem_word(cur), "bus quad belongs to its address");
      cur = cur + 1;
    end
    dp_q <= demand_pre;
  end

  int l1, l2;
  qaddr_t a;

  initial begin
    dp_q = '0; cur = '0;
    start_env();
    for (int i = 0; i < 800; i++) begin
      a = '0;
      a[45:9] = 37'(32'h40 + $urandom_range(3) * 32'h7);
      a[8:0]  = 9'($urandom_range(127));
      for (int k = 0; k < int'($urandom_range(5)) + 1; k++) request(a + qaddr_t'(2 * k), l1, l2);
    end
    foreach (seen[s]) check(seen[s] > 0, "state visited");
    finish_test();
  end
endmodule
