// Tag/status memory of the instruction cache (TAG0, TAG1, STATUS0, STATUS1).
//
// One row per set holds the 37-bit tags and 34-bit status words of both ways, so
// that a lookup sees the whole set at once. The status word is
// {LRU bit, block valid, 32 data-valid bits}; the document names these fields,
// their order is this design's choice.
//
// Ports:
//   - fetcher read port (set_f -> row_f) and server read port (set_s -> row_s),
//     both combinational, as in the schematic where the memory has separate
//     "F" and "S" outputs;
//   - one full-row write port used by the fetcher after a fetch (we, wset, wrow);
//   - an LRU touch from the server on a cache hit (touch, tset, tway): the
//     touched way becomes most recently used. When both writes hit the same row
//     in one cycle, the touch decides the LRU bits.
// Writes take effect at the rising clock edge. Reset clears all rows, so every
// block starts invalid.
module ic_tag_status_ram
  import icache_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  set_t     set_f,
  output tag_row_t row_f,
  input  set_t     set_s,
  output tag_row_t row_s,
  input  logic     we,
  input  set_t     wset,
  input  tag_row_t wrow,
  input  logic     touch,
  input  set_t     tset,
  input  logic     tway
);

  tag_row_t mem [SETS];

  assign row_f = mem[set_f];
  assign row_s = mem[set_s];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SETS; i++) mem[i] <= '0;
    end else begin
      if (we) mem[wset] <= wrow;
      if (touch) begin                // a touch of the same set overrides the LRU bits of a write
        mem[tset].st0.lru <= tway;    // way 1 used -> way 0 is least recently used
        mem[tset].st1.lru <= !tway;
      end
    end
  end

endmodule
