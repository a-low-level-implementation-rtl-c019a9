// Behavioural model of the bus unit, the MMU and main memory, for testbenches.
//
// The MMU translates identically. Main memory holds at every quad address a
// word derived from the address itself (mem_word), so any returned quad can be
// checked without storing memory contents. After a one-cycle Valid pulse the
// model waits LATENCY cycles and then returns Count+1 quads in address order,
// one per Ready pulse; with GAPS set it inserts random idle cycles between
// quads. Cancel abandons the rest of the transfer at once. A Valid while a
// transfer is still running is counted as a protocol error.
// With MEM_AW > 0 the model instead keeps only the low MEM_AW address bits
// (a small test address decoder) and memory holds its own address at every
// word, as in a data memory "filled with its own addresses".
// The signal names follow the original bus-unit interface; the timing, the
// memory contents and the error counting are this model's own choices.
module tb_bus_unit_model
  import icache_pkg::*;
#(
  parameter int unsigned LATENCY = 3,
  parameter bit          GAPS    = 1'b1,
  parameter int unsigned MEM_AW  = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               valid,
  input  logic [COUNT_W-1:0] count,
  input  logic               cancel,
  input  qaddr_t             address,
  output quad_t              data,
  output logic               ready,
  output int unsigned        transfers,
  output int unsigned        cancels,
  output int unsigned        quads,
  output int unsigned        errors
);

  function automatic quad_t mem_word(qaddr_t a);
    if (MEM_AW != 0) return quad_t'(a & ((qaddr_t'(1) << MEM_AW) - 1));
    return a[31:0] ^ {18'h0, a[45:32]} ^ 32'h5A00_0000;
  endfunction

  logic        busy;
  qaddr_t      cur;
  int unsigned left, wait_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; ready <= 1'b0; data <= '0; cur <= '0; left <= 0; wait_cnt <= 0;
      transfers <= 0; cancels <= 0; quads <= 0; errors <= 0;
    end else begin
      ready <= 1'b0;
      if (cancel) begin
        busy    <= 1'b0;
        cancels <= cancels + 1;
      end else if (valid) begin
        if (busy) errors <= errors + 1;
        busy      <= 1'b1;
        cur       <= address;
        left      <= int'(count) + 1;
        wait_cnt  <= LATENCY;
        transfers <= transfers + 1;
      end else if (busy) begin
        if (wait_cnt != 0) begin
          wait_cnt <= wait_cnt - 1;
        end else if (!GAPS || ($urandom_range(3) != 0)) begin
          ready <= 1'b1;
          data  <= mem_word(cur);
          quads <= quads + 1;
          cur   <= cur + 1;
          left  <= left - 1;
          if (left == 1) busy <= 1'b0;
        end
      end
    end
  end

endmodule
