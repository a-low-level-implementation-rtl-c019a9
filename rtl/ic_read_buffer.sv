// Read buffer: a copy of one transfer block of the data RAM with the data-valid
// bits it had in the cache.
//
// When the server finds a hit in the cache it reads the whole transfer block
// (8 quads) into this buffer; following quads of the same transfer block are
// then served from here without a RAM access. The valid bits are needed because
// only part of a transfer block may be present in the cache. load copies data
// and valid bits at the rising clock edge. Reset clears the valid bits.
module ic_read_buffer
  import icache_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [TBLK_W-1:0]   din,
  input  logic [TB_QUADS-1:0] vin,
  output logic [TBLK_W-1:0]   data,
  output logic [TB_QUADS-1:0] valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      data  <= '0;
    end else if (load) begin
      valid <= vin;
      data  <= din;
    end
  end

endmodule
