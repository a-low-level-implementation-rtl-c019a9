// Exhaustive and random test of the control bus unit: the fetch-buffer load
// decode for every quad pointer value, and the quad selection from the fetch
// or read buffer.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ic_control_bus_unit;
  import icache_pkg::*;

  logic                enab_f, ready, src_fb;
  qp_t                 qp;
  logic [TB_QUADS-1:0] fb_load, exp_load;
  logic [WORD_W-1:0]   word;
  logic [TBLK_W-1:0]   fb_data, rb_data;
  quad_t               quad;
  int checks = 0, failures = 0;

  ic_control_bus_unit dut (.enab_f, .ready, .qp, .fb_load, .src_fb, .word, .fb_data, .rb_data, .quad);

  initial begin
    src_fb = 0; word = 0; fb_data = '0; rb_data = '0;
    for (int i = 0; i < 64; i++) begin
      {enab_f, ready, qp} = 6'(i);
      #1;
      exp_load = (enab_f && ready && qp >= 1 && qp <= 8) ? 8'(1 << (qp - 1)) : 8'h00;
      checks++;
      if (fb_load != exp_load) begin
        failures++;
        $display("FAIL load enab=%0d ready=%0d qp=%0d got %b", enab_f, ready, qp, fb_load);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      for (int q = 0; q < TB_QUADS; q++) begin
        fb_data[q*QUAD_W +: QUAD_W] = $urandom;
        rb_data[q*QUAD_W +: QUAD_W] = $urandom;
      end
      src_fb = 1'($urandom_range(1));
      word   = 3'($urandom);
      #1;
      checks++;
      if (quad != (src_fb ? fb_data[word*32 +: 32] : rb_data[word*32 +: 32])) begin
        failures++;
        $display("FAIL quad select src_fb=%0d word=%0d", src_fb, word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
