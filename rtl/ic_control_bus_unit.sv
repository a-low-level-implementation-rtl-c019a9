// Control bus unit: the glue between the fetcher, the server and the two
// buffers.
//
// Fetcher side: while the fetcher accepts quads (enab_f) a Ready from the bus
// unit writes the incoming quad into fetch-buffer slot qp-1; quad pointer values
// 1..8 address the eight slots, 0 and 9 address none. Server side: the quad
// handed to the instruction unit is taken from the fetch buffer or the read
// buffer (src_fb) at quad index word. The block is only named in the document;
// this split of duties is this design's choice. Purely combinational.
// Quad pointer values 0 and 9 to 15 select no slot. Only the low three bits of
// the pointer minus one index the slot; the range check covers the rest.
module ic_control_bus_unit
  import icache_pkg::*;
(
  input  logic                enab_f,
  input  logic                ready,
  input  qp_t                 qp,
  output logic [TB_QUADS-1:0] fb_load,
  input  logic                src_fb,
  input  logic [WORD_W-1:0]   word,
  input  logic [TBLK_W-1:0]   fb_data,
  input  logic [TBLK_W-1:0]   rb_data,
  output quad_t               quad
);

  qp_t slot;

  always_comb begin
    slot    = qp - qp_t'(1);
    fb_load = '0;
    if (enab_f && ready && qp >= qp_t'(1) && qp <= qp_t'(TB_QUADS))
      fb_load[slot[WORD_W-1:0]] = 1'b1;
  end

  assign quad = src_fb ? fb_data[word*QUAD_W +: QUAD_W] : rb_data[word*QUAD_W +: QUAD_W];

endmodule
