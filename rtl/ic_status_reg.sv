// Status register: transfer-block addresses of the fetch buffer and the read
// buffer, and the prefetch address.
//
// fetch_ad is loaded when a fetch starts (fb_init), read_ad when the read buffer
// is loaded (rb_load). fb_used / rb_used tell whether the address has ever been
// loaded since reset. pref_ad is the quad address of the first quad of the
// transfer block that follows the one the instruction unit asks for; the
// fetcher prefetches from there and the MMU translates it. The 43-bit
// transfer-block increment is a plain adder here.
module ic_status_reg
  import icache_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   fb_init,
  input  tba_t   fb_tba,
  input  logic   rb_load,
  input  tba_t   rb_tba,
  input  qaddr_t address,
  output tba_t   fetch_ad,
  output tba_t   read_ad,
  output logic   fb_used,
  output logic   rb_used,
  output qaddr_t pref_ad
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_ad <= '0;
      read_ad  <= '0;
      fb_used  <= 1'b0;
      rb_used  <= 1'b0;
    end else begin
      if (fb_init) begin
        fetch_ad <= fb_tba;
        fb_used  <= 1'b1;
      end
      if (rb_load) begin
        read_ad <= rb_tba;
        rb_used <= 1'b1;
      end
    end
  end

  assign pref_ad = {tba_of(address) + tba_t'(1), {WORD_W{1'b0}}};

endmodule
