// Fetch buffer: eight quad registers with a valid bit each, between the bus unit
// and the data RAM.
//
// A fetch starts with init, which clears all valid bits (the transfer-block
// address of the buffer lives in the status register). Each quad coming from the
// bus unit is written into the slot selected by the one-hot load vector (decoded
// from the fetcher's quad pointer) and its valid bit is set. The whole buffer is
// visible at once, so a completed or partial transfer block can be written to
// the data RAM in one access and the server can take quads out as they arrive.
// Loads and init act at the rising clock edge; init wins over a load.
// The data and status registers follow the original buffer; the one-hot slot
// load and the clearing at the start of a fetch are this design's choices.
module ic_fetch_buffer
  import icache_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                init,
  input  logic [TB_QUADS-1:0] load,
  input  quad_t               din,
  output logic [TBLK_W-1:0]   data,
  output logic [TB_QUADS-1:0] valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      data  <= '0;
    end else if (init) begin
      valid <= '0;
    end else begin
      for (int q = 0; q < TB_QUADS; q++) begin
        if (load[q]) begin
          data[q*QUAD_W +: QUAD_W] <= din;
          valid[q]                 <= 1'b1;
        end
      end
    end
  end

endmodule
