// Random test of one communication system with the arbiter side driven at
// random. The model tracks gen, the controller state, OUT with its
// read/write bit, and IN. Checks: gen counts down unless the controller
// waits on a set read/write bit; OUT is loaded exactly when gen has even
// parity and low bits 00 in "generate"; the bit is cleared by the arbiter's
// enable; IN takes the bus on in_load.
// The expected behaviour follows the original description of the block; the
// stimulus and the reference model are this testbench's own.
module tb_ex_comm_system;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       out_en, in_load, out_rw, wait_st;
  logic [7:0] bus, out_data, in_data, gen_q;
  logic [7:0] m_gen, m_out, m_in;
  logic       m_rw, m_wait;
  int checks = 0, failures = 0;
  int n_fire = 0, n_hold = 0;

  ex_comm_system dut (.clk, .rst_n, .out_en, .in_load, .bus, .out_rw, .out_data, .in_data, .gen_q, .wait_st);

  initial begin
    out_en = 0; in_load = 0; bus = 0;
    m_gen = 8'hFF; m_out = 0; m_in = 0; m_rw = 0; m_wait = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      logic fire, hold;
      out_en  = m_rw && ($urandom_range(7) == 0);
      in_load = ($urandom_range(3) == 0);
      bus     = 8'($urandom);
      @(posedge clk);
      fire = !m_wait && !(^m_gen) && m_gen[1:0] == 2'b00;
      hold = m_wait && m_rw;
      n_fire += fire;
      n_hold += hold;
      if (in_load) m_in = bus;
      if (fire) m_out = m_gen;
      if (!hold) m_gen = m_gen - 1;
      m_wait = m_wait ? m_rw : fire;
      if (fire) m_rw = 1;
      else if (out_en) m_rw = 0;
      @(negedge clk);
      checks++;
      if (gen_q != m_gen || out_rw != m_rw || wait_st != m_wait || in_data != m_in || (m_rw && out_data != m_out)) begin
        failures++;
        $display("FAIL gen %h/%h rw %b/%b wait %b/%b in %h/%h out %h/%h", gen_q, m_gen, out_rw, m_rw,
                 wait_st, m_wait, in_data, m_in, out_data, m_out);
      end
    end
    checks++;
    if (n_fire == 0 || n_hold == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
